// tb_carla_top: end-to-end test of the CARLA accelerator at reduced size.
//
// The array is shrunk to five CUs (U = 4, 16 PEs) with 8-word banks and a
// feedback chain whose taps (5, 16, 24, 28, 32, 36 cycles) match the small
// feature maps used here. A behavioural DRAM (an array read in the same
// cycle) holds random input features and weights. Several layers are run in
// 3x3, 1x1 and small-in-fmap 1x1 mode, with and without pruning, with stride 2 and with
// partitions and filter groups that do not divide evenly. For each layer the
// testbench
//   - recomputes every output with a direct convolution (zero padding 1 for
//     3x3, the same pseudo-random pruning pattern from its own LFSR model,
//     rounding: arithmetic shift by FRAC and saturation) and compares all
//     output words written to DRAM, and checks that nothing else is written;
//   - checks the number of compute cycles against the cycle equations
//     (3x3: (3*OL^2 - 2*OL)*IC*ceil(K/G); 1x1: (U+1)*IC*P*ceil(K/U); 1x1 for
//     small in-fmaps: (OL^2+1)*IC*ceil(K/#PE), one load and one cycle per
//     feature) and the number of weight and feature reads against the access
//     equations (small in-fmaps: every weight fetched once, the in-fmap once
//     per group of #PE filters).
// It also counts how often each dataflow mechanism acted (1x1 load stall,
// feedback reuse, pruned-row skip, border zeroing, drain wait, preload,
// zero-weight row) and fails if one never did.
// Finally the heterogeneous SRAM pair beside CARLA (448-word default) gets
// one pass: both CUs fill their private SRAMs and their halves of the shared
// SRAM, then everything is read back over both shared ports at once while
// CU writes into the shared SRAM are attempted and must be ignored.
module tb_carla_top;
  import carla_pkg::*;

  localparam int unsigned NUM_CU = 5;
  localparam int unsigned U      = NUM_CU - 1;
  localparam int unsigned BD     = 8;
  localparam int unsigned FRAC   = 4;
  localparam int unsigned NPE    = 3 * U + 4;
  localparam int MEMW = 32768;
  localparam int IN_BASE = 0, W_BASE = 8192, OUT_BASE = 16384;

  logic clk = 0, rst_n = 0, start = 0;
  cfg_t cfg;
  logic busy, done;
  logic  rd_en [4];
  addr_t rd_addr [4];
  word_t rd_data [4];
  logic  wr_valid [4];
  addr_t wr_addr [4];
  word_t wr_data [4];
  ev_t   ev;

  // heterogeneous SRAM pair, exercised on its own after the CARLA layers
  localparam int unsigned HD = 448;
  logic        hs_xfer = 0;
  logic        hs_m_we [2], hs_m_re [2], hs_p_we [2], hs_x_re [2];
  logic [8:0]  hs_m_waddr [2], hs_m_raddr [2], hs_p_waddr [2];
  logic [9:0]  hs_x_raddr [2];
  logic [31:0] hs_m_wdata [2], hs_m_rdata [2];
  logic [15:0] hs_p_wdata [2], hs_x_rdata [2];

  carla_top #(.NUM_CU(NUM_CU), .BANK_DEPTH(BD), .SEG('{11, 8, 4, 4, 4}),
              .MAX_ROWS(8), .FRAC(FRAC)) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .dram_rd_en(rd_en), .dram_rd_addr(rd_addr), .dram_rd_data(rd_data),
    .dram_wr_valid(wr_valid), .dram_wr_addr(wr_addr), .dram_wr_data(wr_data), .ev,
    .hs_xfer, .hs_m_we, .hs_m_waddr, .hs_m_wdata, .hs_m_re, .hs_m_raddr, .hs_m_rdata,
    .hs_p_we, .hs_p_waddr, .hs_p_wdata, .hs_x_re, .hs_x_raddr, .hs_x_rdata);

  always #5 clk = ~clk;

  word_t mem [MEMW];
  int    written [MEMW];
  int    checks = 0, failures = 0;
  longint cyc = 0;
  // per-layer counters
  int n_w_rd, n_x_rd, n_compute, n_wr;
  int ev_cnt [7];

  always_comb
    for (int b = 0; b < 4; b++)
      rd_data[b] = (rd_en[b] && rd_addr[b] < MEMW) ? mem[rd_addr[b]] : word_t'(0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int b = 0; b < 4; b++) begin
        if (rd_en[b]) begin
          if (rd_addr[b] >= W_BASE && rd_addr[b] < OUT_BASE) n_w_rd++;
          else n_x_rd++;
        end
        if (wr_valid[b]) begin
          n_wr++;
          if (wr_addr[b] < OUT_BASE || wr_addr[b] >= MEMW) begin
            failures++;
            $display("FAIL: write outside the out-fmap region at %0d", wr_addr[b]);
          end else begin
            mem[wr_addr[b]] <= wr_data[b];
            written[wr_addr[b]] <= written[wr_addr[b]] + 1;
          end
        end
      end
      if (dut.uop_nxt.en_acc1 ||
          (dut.uop_nxt.mode != MODE_3X3 && (dut.uop_nxt.wr_s || dut.uop_nxt.load))) n_compute++;
      if (ev.stall_1x1)  ev_cnt[0]++;
      if (ev.feedback)   ev_cnt[1]++;
      if (ev.skip)       ev_cnt[2]++;
      if (ev.border)     ev_cnt[3]++;
      if (ev.drain_wait) ev_cnt[4]++;
      if (ev.preload)    ev_cnt[5]++;
      if (ev.zero_row)   ev_cnt[6]++;
    end
  end

  // independent model of the pruning LFSR (x^16 + x^14 + x^13 + x^11 + 1)
  function automatic bit [15:0] lfsr_next(bit [15:0] v);
    return {v[14:0], v[15] ^ v[13] ^ v[12] ^ v[10]};
  endfunction

  function automatic word_t sat(longint v);
    longint s;
    s = v >>> FRAC;
    if (s > 32767) return 16'sh7fff;
    if (s < -32768) return 16'sh8000;
    return word_t'(s);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_layer(mode_e mode, int il, int stride, int ic, int k, int part_rows,
                           bit prune, bit [15:0] seed, bit [15:0] thresh, int amp);
    int ol, plane, groups, parts, exp_compute, exp_w, exp_x, bad;
    bit keep [];
    bit [15:0] v;
    longint t0;
    ol = (mode == MODE_3X3) ? il : (il - 1) / stride + 1;
    plane = ol * ol;
    // fill DRAM
    for (int a = 0; a < MEMW; a++) begin
      written[a] = 0;
      mem[a] = (a < OUT_BASE) ? word_t'($urandom_range(2 * amp) - amp) : word_t'(16'h5a5a);
    end
    // pruning pattern, one decision per filter row in channel-major order
    keep = new[ic * 3];
    v = (seed == 0) ? 16'h1 : seed;
    for (int n = 0; n < ((mode == MODE_3X3) ? 3 * ic : ic); n++) begin
      keep[n] = !prune || (v > thresh);
      v = lfsr_next(v);
    end
    cfg = '0;
    cfg.mode = mode; cfg.il = DIMW'(il); cfg.ol = DIMW'(ol); cfg.stride = 2'(stride);
    cfg.ic = CHW'(ic); cfg.k = CHW'(k); cfg.part_rows = DIMW'(part_rows);
    cfg.in_base = IN_BASE; cfg.w_base = W_BASE; cfg.out_base = OUT_BASE;
    cfg.prune_en = prune; cfg.prune_seed = seed; cfg.prune_thresh = thresh;
    n_w_rd = 0; n_x_rd = 0; n_compute = 0; n_wr = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    while (!done) @(posedge clk);
    @(posedge clk);
    // compare every output
    bad = 0;
    for (int kk = 0; kk < k; kk++)
      for (int r = 0; r < ol; r++)
        for (int cc = 0; cc < ol; cc++) begin
          longint acc;
          int a;
          acc = 0;
          for (int ch = 0; ch < ic; ch++) begin
            if (mode == MODE_3X3) begin
              for (int fr = 0; fr < 3; fr++) begin
                if (!keep[ch * 3 + fr]) continue;
                for (int fc = 0; fc < 3; fc++) begin
                  int ir, icol;
                  ir = r + fr - 1; icol = cc + fc - 1;
                  if (ir < 0 || ir >= il || icol < 0 || icol >= il) continue;
                  acc += longint'(mem[IN_BASE + (ch * il + ir) * il + icol]) *
                         longint'(mem[W_BASE + ((kk * ic + ch) * 3 + fr) * 3 + fc]);
                end
              end
            end else if (keep[ch]) begin
              acc += longint'(mem[IN_BASE + (ch * il + r * stride) * il + cc * stride]) *
                     longint'(mem[W_BASE + kk * ic + ch]);
            end
          end
          a = OUT_BASE + (kk * ol + r) * ol + cc;
          if (mem[a] !== sat(acc) || written[a] != 1) begin
            bad++;
            if (bad < 6) $display("FAIL: k=%0d (%0d,%0d) got %0d want %0d (written %0d)",
                                  kk, r, cc, mem[a], sat(acc), written[a]);
          end
        end
    check(bad == 0, $sformatf("%0d wrong outputs", bad));
    check(n_wr == k * plane, $sformatf("%0d output words written, %0d expected", n_wr, k * plane));
    // cycle and access equations (without pruning)
    if (mode == MODE_3X3) begin
      groups = (k + NUM_CU - 1) / NUM_CU;
      parts  = (ol + part_rows - 1) / part_rows;
      exp_compute = (3 * ol * ol - 2 * ol) * ic * groups;
      exp_w = 9 * k * ic * parts;
    end else if (mode == MODE_1X1S) begin
      groups = (k + NPE - 1) / NPE;
      exp_compute = (plane + 1) * ic * groups;
      exp_w = k * ic;
      exp_x = plane * ic * groups;
    end else begin
      groups = (k + U - 1) / U;
      parts  = (plane + NPE - 1) / NPE;
      exp_compute = (U + 1) * ic * parts * groups;
      exp_w = k * ic * parts;
      exp_x = plane * ic * groups;
    end
    if (!prune) begin
      check(n_compute == exp_compute,
            $sformatf("compute cycles %0d, equation gives %0d", n_compute, exp_compute));
      check(n_w_rd == exp_w, $sformatf("weight reads %0d, expected %0d", n_w_rd, exp_w));
      if (mode != MODE_3X3)
        check(n_x_rd == exp_x, $sformatf("feature reads %0d, expected %0d", n_x_rd, exp_x));
      else
        check(n_x_rd <= exp_compute, $sformatf("feature reads %0d above %0d", n_x_rd, exp_compute));
    end else begin
      check(n_compute < exp_compute, "pruning saved no cycles");
    end
    $display("layer %s il=%0d ic=%0d k=%0d prune=%0d: %0d cycles, %0d compute (eq %0d), %0d weight and %0d feature reads",
             mode.name(), il, ic, k, prune, cyc - t0, n_compute, exp_compute, n_w_rd, n_x_rd);
  endtask

  // Heterogeneous SRAM pair: while computing (xfer = 0) both CUs write their
  // private SRAMs and their halves of the shared output SRAM; during the
  // transfer (xfer = 1) both shared ports read, two words per cycle, and CU
  // writes into the shared SRAM are ignored.
  task automatic hs_test();
    logic [31:0] mref [2][HD];
    logic [15:0] pref [2 * HD];
    for (int i = 0; i < 2; i++) begin
      hs_m_we[i] = 0; hs_m_re[i] = 0; hs_p_we[i] = 0; hs_x_re[i] = 0;
    end
    @(negedge clk);
    hs_xfer = 0;
    for (int a = 0; a < HD; a++) begin
      for (int i = 0; i < 2; i++) begin
        hs_m_we[i] = 1; hs_m_waddr[i] = 9'(a); hs_m_wdata[i] = $urandom; mref[i][a] = hs_m_wdata[i];
        hs_p_we[i] = 1; hs_p_waddr[i] = 9'(a); hs_p_wdata[i] = 16'($urandom);
        pref[i * HD + a] = hs_p_wdata[i];
      end
      @(negedge clk);
    end
    hs_xfer = 1;
    for (int a = 0; a < HD; a++) begin
      for (int i = 0; i < 2; i++) begin
        hs_m_we[i] = 0; hs_m_re[i] = 1; hs_m_raddr[i] = 9'(a);
        hs_p_we[i] = 1; hs_p_waddr[i] = 9'(a); hs_p_wdata[i] = ~pref[i * HD + a];
        hs_x_re[i] = 1; hs_x_raddr[i] = 10'(i * HD + a);
      end
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        check(hs_m_rdata[i] === mref[i][a], $sformatf("hetero SRAM M%0d[%0d]", i, a));
        check(hs_x_rdata[i] === pref[i * HD + a], $sformatf("hetero SRAM P[%0d]", i * HD + a));
      end
    end
    for (int i = 0; i < 2; i++) begin
      hs_p_we[i] = 0; hs_x_re[i] = 1; hs_x_raddr[i] = 10'(i * HD);
    end
    @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      check(hs_x_rdata[i] === pref[i * HD], "hetero SRAM written during transfer");
      hs_m_re[i] = 0; hs_x_re[i] = 0;
    end
    hs_xfer = 0;
  endtask

  initial begin
    for (int i = 0; i < 7; i++) ev_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_layer(MODE_3X3, 8, 1, 3, 7, 3, 0, 0, 0, 60);       // partial group, 3+3+2 rows
    run_layer(MODE_3X3, 8, 1, 2, 5, 3, 0, 0, 0, 3000);     // saturation
    run_layer(MODE_1X1, 8, 1, 3, 8, 0, 0, 0, 0, 100);
    run_layer(MODE_1X1, 9, 2, 2, 6, 0, 0, 0, 0, 100);      // stride 2, partial group
    run_layer(MODE_3X3, 8, 1, 4, 5, 3, 1, 16'hace1, 16'h8000, 60);
    run_layer(MODE_1X1, 8, 1, 6, 4, 0, 1, 16'h1234, 16'h8000, 100);
    run_layer(MODE_1X1S, 2, 1, 5, 40, 0, 0, 0, 0, 100);     // small in-fmap, three groups
    run_layer(MODE_1X1S, 2, 1, 6, 20, 0, 1, 16'h0bad, 16'h8000, 100);
    hs_test();
    check(ev_cnt[0] > 0, "1x1 load stall never happened");
    check(ev_cnt[1] > 0, "feedback reuse never happened");
    check(ev_cnt[2] > 0, "pruned-row skip never happened");
    check(ev_cnt[3] > 0, "border zeroing never happened");
    check(ev_cnt[4] > 0, "drain wait never happened");
    check(ev_cnt[5] > 0, "preload never happened");
    check(ev_cnt[6] > 0, "zero-weight last-channel row never happened");
    $display("events: stall_1x1=%0d feedback=%0d skip=%0d border=%0d drain_wait=%0d preload=%0d zero_row=%0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
