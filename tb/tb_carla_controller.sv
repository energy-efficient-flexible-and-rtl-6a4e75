// tb_carla_controller: self-checking test of the sequencer at full size
// (65 CUs, 75-word banks, feedback segments 19/84/14/16/26).
//
// The controller runs alone. The testbench models what surrounds it: an
// independent LFSR for the pruner, and a drain that stays busy for
// ceil(196/4) * n_addr + 1 cycles after each start. It counts the
// micro-operations and DRAM reads of several layers and checks them against
// the equations of the design description:
//   3x3: compute cycles = (3*OL^2 - 2*OL) * IC * ceil(K/65)       (Z = 1)
//        weight reads   = 9 * K * IC * P   (three words per filter row,
//                         reloaded for each of the P partitions)
//        feature reads  = every input row a partition needs, once per
//                         channel and filter group: rows shared by
//                         consecutive filter-row steps come back through the
//                         feedback chain ((rows-1)*W = 168 = tap 3 for the
//                         56-wide layer with 4-row partitions)
//   1x1: compute cycles = (U+1) * IC * P * ceil(K/U)
//        weight reads   = K * IC * P,  feature reads = OL^2 * IC * ceil(K/U)
//   1x1, small in-fmaps: one channel per U+1 cycles (the description counts
//        U), so time ~ (U+1) * IC * ceil(K/196); every weight read once
//        (K * IC), features OL^2 * IC * ceil(K/196)
// With enough channels per pass the drain must hide behind the computation,
// so the total time may exceed the compute cycles by at most 2 % plus the
// last drain. It also checks that a drain is started once per pass and never while the
// previous one is busy, that the pruner advances once per filter row (or
// channel) and pass, that a pruned layer skips steps and saves cycles, and
// that done arrives.
module tb_carla_controller;
  import carla_pkg::*;
  localparam int unsigned NUM_CU = 65;
  localparam int unsigned U      = NUM_CU - 1;
  localparam int unsigned BD     = 75;
  localparam int unsigned BAW    = $clog2(BD);
  localparam int unsigned NGRP   = (3 * U + 4 + 3) / 4;
  localparam addr_t W_BASE = 32'h0010_0000;

  logic         clk = 0, rst_n = 0, start = 0;
  cfg_t         cfg, cfg_q;
  logic         busy, done;
  uop_t         uop, uop_nxt;
  logic [2:0]   pipe_sel;
  logic         rd_en [4];
  addr_t        rd_addr [4];
  logic         prune_restart, prune_advance, prune_keep;
  logic         drain_start, drain_busy;
  drain_t       drain_info;
  logic [BAW:0] drain_n_addr;
  ev_t          ev;

  carla_controller dut (.clk, .rst_n, .start, .cfg, .cfg_q, .busy, .done, .uop, .uop_nxt,
                        .pipe_sel, .rd_en, .rd_addr, .prune_restart, .prune_advance,
                        .prune_keep, .drain_start, .drain_info, .drain_n_addr, .drain_busy,
                        .ev);

  always #5 clk = ~clk;

  // surroundings
  logic [15:0] lfsr;
  int          drain_left;
  assign prune_keep = !cfg_q.prune_en || (lfsr > cfg_q.prune_thresh);
  assign drain_busy = (drain_left > 0);

  int checks = 0, failures = 0;
  int n_compute, n_w, n_x, n_drain, n_adv, n_skip, n_fb, n_done, n_bad_drain;

  always @(posedge clk) begin
    if (!rst_n) begin
      lfsr <= 16'h1;
      drain_left <= 0;
    end else begin
      if (prune_restart) lfsr <= (cfg_q.prune_seed == 0) ? 16'h1 : cfg_q.prune_seed;
      else if (prune_advance) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (drain_start) begin
        if (drain_busy) n_bad_drain++;
        drain_left <= NGRP * int'(drain_n_addr) + 1;
        n_drain++;
      end else if (drain_left > 0) drain_left <= drain_left - 1;
      if (uop.en_acc1 || (uop.mode != MODE_3X3 && (uop.wr_s || uop.load))) n_compute++;
      for (int b = 0; b < 4; b++)
        if (rd_en[b]) begin
          if (rd_addr[b] >= W_BASE) n_w++;
          else n_x++;
        end
      if (prune_advance) n_adv++;
      if (ev.skip) n_skip++;
      if (ev.feedback) n_fb++;
      if (done) n_done++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(mode_e mode, int il, int stride, int ic, int k, int rows,
                     bit prune, output int cycles);
    int ol;
    ol = (mode == MODE_3X3) ? il : (il - 1) / stride + 1;
    cfg = '0;
    cfg.mode = mode; cfg.il = DIMW'(il); cfg.ol = DIMW'(ol); cfg.stride = 2'(stride);
    cfg.ic = CHW'(ic); cfg.k = CHW'(k); cfg.part_rows = DIMW'(rows);
    cfg.in_base = 0; cfg.w_base = W_BASE; cfg.out_base = 32'h0100_0000;
    cfg.prune_en = prune; cfg.prune_seed = 16'h5eed; cfg.prune_thresh = 16'h9000;
    n_compute = 0; n_w = 0; n_x = 0; n_drain = 0; n_adv = 0; n_skip = 0; n_fb = 0;
    n_done = 0; n_bad_drain = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    check(n_done == 1, "done did not pulse once");
    check(!busy, "busy after done");
    check(n_bad_drain == 0, "drain started while busy");
    $display("%s il=%0d ic=%0d k=%0d prune=%0d: %0d cycles, compute %0d, weights %0d, features %0d, feedback %0d, skips %0d",
             mode.name(), il, ic, k, prune, cycles, n_compute, n_w, n_x, n_fb, n_skip);
  endtask

  initial begin
    int cyc, cyc_full, rows_needed, parts, groups;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 3x3, 56x56, 3 channels, 75 filters (two groups), 4-row partitions
    run(MODE_3X3, 56, 1, 3, 75, 4, 0, cyc_full);
    parts = 14; groups = 2;
    rows_needed = 5 + 12 * 6 + 5;
    check(n_compute == (3 * 56 * 56 - 2 * 56) * 3 * groups,
          $sformatf("3x3 compute cycles %0d", n_compute));
    check(n_w == 9 * 75 * 3 * parts, $sformatf("3x3 weight reads %0d", n_w));
    check(n_x == rows_needed * 56 * 3 * groups, $sformatf("3x3 feature reads %0d", n_x));
    check(n_fb == n_compute - n_x, $sformatf("3x3 feedback uses %0d", n_fb));
    check(n_drain == parts * groups, $sformatf("3x3 drains %0d", n_drain));
    check(n_adv == 3 * 3 * parts * groups, $sformatf("3x3 pruner advances %0d", n_adv));
    // the same layer pruned
    run(MODE_3X3, 56, 1, 3, 75, 4, 1, cyc);
    check(n_skip > 0, "no pruned step skipped");
    check(cyc < cyc_full, "pruning saved no time");
    check(n_adv == 3 * 3 * parts * groups, $sformatf("pruned 3x3 pruner advances %0d", n_adv));
    // with 16 channels a pass computes longer than its drain takes, so the
    // drain is hidden and only the bubbles between steps and passes remain
    run(MODE_3X3, 56, 1, 16, 65, 4, 0, cyc);
    check(n_compute == (3 * 56 * 56 - 2 * 56) * 16, $sformatf("3x3/16 compute cycles %0d", n_compute));
    check(cyc < n_compute + n_compute / 50 + NGRP * BD + 200,
          $sformatf("3x3/16 takes %0d cycles for %0d compute cycles", cyc, n_compute));
    // 1x1, 56x56, 4 channels, 64 filters: 16 partitions of 196 pixels
    run(MODE_1X1, 56, 1, 4, 64, 0, 0, cyc);
    check(n_compute == (U + 1) * 4 * 16 * 1, $sformatf("1x1 compute cycles %0d", n_compute));
    check(n_w == U * 4 * 16, $sformatf("1x1 weight reads %0d", n_w));
    check(n_x == 56 * 56 * 4 * 1, $sformatf("1x1 feature reads %0d", n_x));
    check(n_drain == 16, $sformatf("1x1 drains %0d", n_drain));
    // 1x1 stride 2, 28x28 -> 14x14, 8 channels, 100 filters (two groups)
    run(MODE_1X1, 28, 2, 8, 100, 0, 0, cyc_full);
    check(n_compute == (U + 1) * 8 * 1 * 2, $sformatf("1x1/2 compute cycles %0d", n_compute));
    check(n_w == 100 * 8, $sformatf("1x1/2 weight reads %0d", n_w));
    check(n_x == 14 * 14 * 8 * 2, $sformatf("1x1/2 feature reads %0d", n_x));
    run(MODE_1X1, 28, 2, 8, 100, 0, 1, cyc);
    check(n_skip > 0 && cyc < cyc_full, "1x1 pruning skipped nothing");
    // 1x1 for small in-fmaps, 7x7, 64 channels, 512 filters: three groups of
    // 196 filters held in the PE registers, one channel per U+1 cycles
    run(MODE_1X1S, 7, 1, 64, 512, 0, 0, cyc);
    groups = 3;
    check(n_compute == (49 + 1) * 64 * groups, $sformatf("1x1s compute cycles %0d", n_compute));
    check(n_w == 512 * 64, $sformatf("1x1s weight reads %0d (each weight once)", n_w));
    check(n_x == 49 * 64 * groups, $sformatf("1x1s feature reads %0d", n_x));
    check(n_drain == groups, $sformatf("1x1s drains %0d", n_drain));
    check(cyc < (U + 1) * 64 * groups * 102 / 100 + NGRP * 49 + 200,
          $sformatf("1x1s takes %0d cycles, (U+1)*IC*groups = %0d", cyc, (U + 1) * 64 * groups));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
