// carla_drain: moves finished outputs from the P banks of all CUs to DRAM.
//
// After a pass (one partition of the out-fmaps for one group of filters) the
// P banks hold the 16-bit results. The CUs go on writing partial sums into
// their S banks for the next pass while this unit empties the P banks over a
// 64-bit DRAM write bus: four banks (a group of four neighbouring banks,
// counted CU by CU and PE by PE) are read at the same address in one cycle
// and their words leave as four 16-bit lanes. Each lane carries its own DRAM
// word address and a valid bit, because neighbouring banks do not map to
// neighbouring DRAM words; lanes that hold no result (beyond the last filter
// or pixel of the layer) are not written.
//
// Mapping of bank b (CU k = b/3, PE i = b%3; the last CU has PE 0..3) and
// bank address a to the out-fmap [filter][pixel] in DRAM:
//   3x3 mode: filter = filt_base + k, pixel = pix_base + i*BANK_DEPTH + a
//   1x1 mode: filter = filt_base + a, pixel = pix_base + 3*k + i
//   1x1 small-in-fmap mode: filter = filt_base + b, pixel = pix_base + a
// Timing: `start` latches `info` and `n_addr`; one bank group and address is
// read per cycle, group-major, and the lanes appear on the wr_* outputs one
// cycle after their read. `busy` is high from start until the last lane has
// left. A start while busy is ignored (the controller never issues one). The
// 64-bit width and group-of-four read follow the design description; the
// order of the transfer and the per-lane addresses are this implementation's.
module carla_drain
  import carla_pkg::*;
#(
  parameter int unsigned NUM_CU     = 65,
  parameter int unsigned BANK_DEPTH = 75,
  localparam int unsigned NBANK = 3 * (NUM_CU - 1) + 4,
  localparam int unsigned NGRP  = (NBANK + 3) / 4,
  localparam int unsigned BAW   = (BANK_DEPTH > 1) ? $clog2(BANK_DEPTH) : 1,
  localparam int unsigned GW    = (NGRP > 1) ? $clog2(NGRP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  drain_t          info,
  input  logic [BAW:0]    n_addr,
  output logic            busy,
  output logic            p_rd_en,
  output logic [BAW-1:0]  p_rd_addr,
  input  word_t           p_data [NBANK],
  output logic            wr_valid [4],
  output addr_t           wr_addr  [4],
  output word_t           wr_data  [4]
);

  drain_t         inf;
  logic [BAW:0]   n_a;
  logic           active;
  logic [GW-1:0]  grp;
  logic [BAW-1:0] a;
  // meta data of the read issued in the previous cycle
  logic           q_v;
  logic [GW-1:0]  q_grp;
  logic [BAW-1:0] q_a;

  logic last;
  assign last      = (int'(a) == int'(n_a) - 1) && (int'(grp) == NGRP - 1);
  assign p_rd_en   = active;
  assign p_rd_addr = a;
  assign busy      = active || q_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      grp    <= '0;
      a      <= '0;
      q_v    <= 1'b0;
      q_grp  <= '0;
      q_a    <= '0;
      inf    <= '0;
      n_a    <= '0;
    end else begin
      q_v   <= active;
      q_grp <= grp;
      q_a   <= a;
      if (!busy && start) begin
        inf    <= info;
        n_a    <= n_addr;
        active <= (n_addr != 0);
        grp    <= '0;
        a      <= '0;
      end else if (active) begin
        if (last) active <= 1'b0;
        if (int'(a) == int'(n_a) - 1) begin
          a   <= '0;
          grp <= grp + 1'b1;
        end else begin
          a <= a + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      int unsigned b, k, i, filt, pix, o;
      b = int'(q_grp) * 4 + l;
      if (b < 3 * (NUM_CU - 1)) begin
        k = b / 3;
        i = b % 3;
      end else begin
        k = NUM_CU - 1;
        i = b - 3 * (NUM_CU - 1);
      end
      if (inf.mode == MODE_3X3) begin
        o    = i * BANK_DEPTH + int'(q_a);
        filt = int'(inf.filt_base) + k;
        pix  = int'(inf.pix_base) + o;
        wr_valid[l] = q_v && (b < NBANK) && (i < 3) && (k < int'(inf.filt_cnt)) &&
                      (o < int'(inf.pix_cnt));
      end else if (inf.mode == MODE_1X1S) begin
        o    = int'(q_a);
        filt = int'(inf.filt_base) + b;
        pix  = int'(inf.pix_base) + o;
        wr_valid[l] = q_v && (b < NBANK) && (b < int'(inf.filt_cnt)) && (o < int'(inf.pix_cnt));
      end else begin
        o    = 3 * k + i;
        filt = int'(inf.filt_base) + int'(q_a);
        pix  = int'(inf.pix_base) + o;
        wr_valid[l] = q_v && (b < NBANK) && (int'(q_a) < int'(inf.filt_cnt)) &&
                      (o < int'(inf.pix_cnt));
      end
      wr_addr[l] = inf.out_base + addr_t'(filt) * addr_t'(inf.plane) + addr_t'(pix);
      wr_data[l] = (b < NBANK) ? p_data[b] : word_t'(0);
    end
  end

endmodule
