// tb_carla_drain: self-checking test of the output drain (defaults: 65 CUs,
// 196 P banks of 75 words).
//
// A model of the P banks (synchronous read, one clock) holds random words.
// Five transfers are run: 3x3 and 1x1 mode, each once with a full pass and
// once with a partial one (fewer filters and pixels than the banks hold),
// and a partial pass of the small-in-fmap 1x1 mode (one filter per bank).
// Every DRAM write is checked against the bank/address -> filter/pixel
// mapping: each expected output word must be written exactly once with the
// right value and nothing else may be written. The transfer time is checked
// too: ceil(196/4) = 49 bank groups per address, one group per cycle, plus
// one cycle of read latency.
module tb_carla_drain;
  import carla_pkg::*;
  localparam int unsigned NUM_CU = 65;
  localparam int unsigned BD     = 75;
  localparam int unsigned NBANK  = 3 * (NUM_CU - 1) + 4;
  localparam int unsigned NGRP   = (NBANK + 3) / 4;
  localparam int unsigned BAW    = $clog2(BD);

  logic           clk = 0, rst_n = 0, start = 0;
  drain_t         info;
  logic [BAW:0]   n_addr;
  logic           busy, p_rd_en;
  logic [BAW-1:0] p_rd_addr;
  word_t          p_data [NBANK];
  logic           wr_valid [4];
  addr_t          wr_addr [4];
  word_t          wr_data [4];

  carla_drain dut (.clk, .rst_n, .start, .info, .n_addr, .busy, .p_rd_en, .p_rd_addr,
                   .p_data, .wr_valid, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  word_t pmem [NBANK][BD];
  always_ff @(posedge clk)
    if (p_rd_en)
      for (int b = 0; b < NBANK; b++) p_data[b] <= pmem[b][p_rd_addr];

  int checks = 0, failures = 0;
  word_t exp_val [int];
  int    got_cnt [int];
  int    n_wr;

  always @(posedge clk)
    for (int l = 0; l < 4; l++)
      if (wr_valid[l]) begin
        int a;
        a = int'(wr_addr[l]);
        n_wr++;
        if (!exp_val.exists(a)) begin
          failures++;
          if (failures < 8) $display("FAIL: unexpected write at %0d", a);
        end else begin
          if (wr_data[l] !== exp_val[a]) begin
            failures++;
            if (failures < 8) $display("FAIL: addr %0d got %0d want %0d", a, wr_data[l], exp_val[a]);
          end
          got_cnt[a] = got_cnt.exists(a) ? got_cnt[a] + 1 : 1;
        end
      end

  task automatic run(mode_e mode, int fbase, int fcnt, int pbase, int pcnt, int plane, int na);
    int cycles;
    exp_val.delete();
    got_cnt.delete();
    n_wr = 0;
    for (int b = 0; b < NBANK; b++)
      for (int a = 0; a < BD; a++) pmem[b][a] = word_t'($urandom);
    for (int b = 0; b < NBANK; b++) begin
      int k, i;
      k = (b < 3 * (NUM_CU - 1)) ? b / 3 : NUM_CU - 1;
      i = (b < 3 * (NUM_CU - 1)) ? b % 3 : b - 3 * (NUM_CU - 1);
      for (int a = 0; a < na; a++) begin
        int filt, pix;
        if (mode == MODE_3X3) begin
          if (i >= 3 || k >= fcnt || i * BD + a >= pcnt) continue;
          filt = fbase + k; pix = pbase + i * BD + a;
        end else if (mode == MODE_1X1S) begin
          if (b >= fcnt || a >= pcnt) continue;
          filt = fbase + b; pix = pbase + a;
        end else begin
          if (a >= fcnt || 3 * k + i >= pcnt) continue;
          filt = fbase + a; pix = pbase + 3 * k + i;
        end
        exp_val[5000 + filt * plane + pix] = pmem[b][a];
      end
    end
    info = '0;
    info.mode = mode; info.filt_base = CHW'(fbase); info.filt_cnt = CHW'(fcnt);
    info.pix_base = 18'(pbase); info.pix_cnt = 18'(pcnt); info.plane = 18'(plane);
    info.out_base = 5000;
    n_addr = (BAW + 1)'(na);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != NGRP * na + 1) begin
      failures++;
      $display("FAIL: transfer took %0d cycles, %0d expected", cycles, NGRP * na + 1);
    end
    checks++;
    if (n_wr != exp_val.num()) begin
      failures++;
      $display("FAIL: %0d writes, %0d expected", n_wr, exp_val.num());
    end
    foreach (exp_val[a]) begin
      checks++;
      if (!got_cnt.exists(a) || got_cnt[a] != 1) begin
        failures++;
        if (failures < 8) $display("FAIL: output at %0d not written once", a);
      end
    end
    $display("mode %s: %0d words in %0d cycles", mode.name(), n_wr, cycles);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 3x3, 4 rows of 56 = 224 outputs per CU, 65 filters
    run(MODE_3X3, 65, 65, 224, 224, 3136, 75);
    // 3x3 partial: 30 filters, 2 rows of 56 (112 outputs)
    run(MODE_3X3, 0, 30, 3024, 112, 3136, 75);
    // 1x1: 64 filters, 196 pixels
    run(MODE_1X1, 64, 64, 196, 196, 3136, 64);
    // 1x1 partial: 10 filters, last 4 pixels of a 14x14 plane
    run(MODE_1X1, 0, 10, 192, 4, 196, 64);
    // 1x1 for small in-fmaps: 150 filters (one per PE) of a 7x7 plane
    run(MODE_1X1S, 196, 150, 0, 49, 49, 49);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
