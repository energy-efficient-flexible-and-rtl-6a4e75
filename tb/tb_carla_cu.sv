// tb_carla_cu: self-checking test of one convolution unit in both modes.
//
// Two CUs with default bank size (75 words) are driven by the same control
// words: a three-PE CU and the four-PE variant used as the last CU. The
// testbench plays the role of the controller and the pipeline: it builds the
// micro-operation sequence, feeds pr and the broadcast buses, and presents
// each control word together with the next one (ctrl_nxt), as the control
// chain does.
//   3x3: one output row of W outputs, accumulated over IC channels. Per
//   channel: a preload cycle that loads the three weights of the filter row
//   and starts column 0, W feature cycles (M2 zeroes product 2 on the first,
//   M0 product 0 on the last), and one cycle that completes column W-1.
//   The row is placed at output indices that cross a bank boundary, so the
//   bank selection of MUX B and of the A0 read is exercised. Outputs:
//   sum over channels and fc of w[fc] * x[col+fc-1], zero outside the row.
//   1x1: per channel one load cycle (NPE features) and M weight cycles; PE i
//   produces sum over channels of feature_i * w[m] at index m.
// After each test all results are read from the P banks and compared with
// the rounded (>>> 8, saturated) reference. The cycle count of one 3x3
// channel row (W + 2) and one 1x1 channel (M + 1) is fixed by the sequence.
module tb_carla_cu;
  import carla_pkg::*;
  localparam int unsigned BD   = 75;
  localparam int unsigned FRAC = 8;
  localparam int unsigned BAW  = $clog2(BD);

  logic           clk = 0, rst_n = 0;
  uop_t           ctrl, ctrl_nxt;
  word_t          pr;
  word_t          bus [4];
  logic           p_rd_en = 0;
  logic [BAW-1:0] p_rd_addr = '0;
  word_t          p3 [3];
  word_t          p4 [4];

  carla_cu dut3 (.clk, .rst_n, .ctrl, .ctrl_nxt, .pr, .bus, .p_rd_en, .p_rd_addr,
                 .p_rd_data(p3));
  carla_cu #(.NPE(4)) dut4 (.clk, .rst_n, .ctrl, .ctrl_nxt, .pr, .bus, .p_rd_en, .p_rd_addr,
                            .p_rd_data(p4));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // stimulus queues, one entry per cycle
  uop_t  q_u [$];
  word_t q_pr [$];
  word_t q_b [$][4];

  function automatic word_t sat(longint v);
    longint s;
    s = v >>> FRAC;
    if (s > 32767) return 16'sh7fff;
    if (s < -32768) return 16'sh8000;
    return word_t'(s);
  endfunction

  task automatic push(uop_t u, word_t x, word_t b0, word_t b1, word_t b2, word_t b3);
    word_t b [4];
    b = '{b0, b1, b2, b3};
    q_u.push_back(u);
    q_pr.push_back(x);
    q_b.push_back(b);
  endtask

  task automatic play();
    push(UOP_NOP, '0, '0, '0, '0, '0);
    for (int t = 0; t < q_u.size() - 1; t++) begin
      @(negedge clk);
      ctrl = q_u[t];
      ctrl_nxt = q_u[t + 1];
      pr = q_pr[t];
      bus = q_b[t];
    end
    @(negedge clk);
    ctrl = UOP_NOP; ctrl_nxt = UOP_NOP; pr = '0;
    q_u.delete(); q_pr.delete(); q_b.delete();
  endtask

  // read P bank word (bank i, address a) of both CUs
  task automatic read_p(int i, int a, output word_t v3, output word_t v4);
    @(negedge clk);
    p_rd_en = 1; p_rd_addr = BAW'(a);
    @(negedge clk);
    p_rd_en = 0;
    v3 = (i < 3) ? p3[i] : '0;
    v4 = p4[i];
  endtask

  task automatic test_3x3(int base, int W, int IC);
    word_t w [][3];
    word_t x [][];
    uop_t u;
    w = new[IC];
    x = new[IC];
    for (int ch = 0; ch < IC; ch++) begin
      x[ch] = new[W];
      for (int fc = 0; fc < 3; fc++) w[ch][fc] = word_t'($urandom_range(4000) - 2000);
      for (int c = 0; c < W; c++) x[ch][c] = word_t'($urandom_range(4000) - 2000);
    end
    for (int ch = 0; ch < IC; ch++) begin
      // preload: weights, ACC0 <= stored sum of column 0 (or 0)
      u = UOP_NOP; u.mode = MODE_3X3; u.load = 1; u.en_acc0 = 1; u.zero_m0 = 1;
      u.first = (ch == 0); u.rd = (ch > 0); u.rd_idx = IDXW'(base);
      push(u, word_t'($urandom), '0, w[ch][0], w[ch][1], w[ch][2]);
      for (int j = 0; j < W; j++) begin
        u = UOP_NOP; u.mode = MODE_3X3; u.en_acc0 = 1; u.en_acc1 = 1;
        u.zero_m0 = (j == W - 1); u.zero_m2 = (j == 0);
        u.first = (ch == 0) || (j == W - 1);
        u.rd = (ch > 0) && (j < W - 1); u.rd_idx = IDXW'(base + j + 1);
        u.wr_s = (j >= 1); u.wr_p = (ch == IC - 1); u.wr_idx = IDXW'(base + j - 1);
        push(u, x[ch][j], word_t'($urandom), word_t'($urandom), word_t'($urandom),
             word_t'($urandom));
      end
      // complete column W-1
      u = UOP_NOP; u.mode = MODE_3X3; u.zero_m2 = 1;
      u.wr_s = 1; u.wr_p = (ch == IC - 1); u.wr_idx = IDXW'(base + W - 1);
      push(u, word_t'($urandom), '0, '0, '0, '0);
    end
    play();
    for (int c = 0; c < W; c++) begin
      longint acc;
      word_t v3, v4;
      int o;
      acc = 0;
      for (int ch = 0; ch < IC; ch++)
        for (int fc = 0; fc < 3; fc++)
          if (c + fc - 1 >= 0 && c + fc - 1 < W)
            acc += longint'(w[ch][fc]) * longint'(x[ch][c + fc - 1]);
      o = base + c;
      read_p(o / BD, o % BD, v3, v4);
      checks++;
      if (v3 !== sat(acc) || v4 !== sat(acc)) begin
        failures++;
        $display("FAIL: 3x3 base %0d col %0d got %0d/%0d want %0d", base, c, v3, v4, sat(acc));
      end
    end
  endtask

  task automatic test_1x1(int M, int IC);
    word_t f [][4];
    word_t w [][];
    uop_t u;
    f = new[IC];
    w = new[M];
    for (int ch = 0; ch < IC; ch++)
      for (int i = 0; i < 4; i++) f[ch][i] = word_t'($urandom_range(8000) - 4000);
    for (int m = 0; m < M; m++) begin
      w[m] = new[IC];
      for (int ch = 0; ch < IC; ch++) w[m][ch] = word_t'($urandom_range(8000) - 4000);
    end
    for (int ch = 0; ch < IC; ch++) begin
      u = UOP_NOP; u.mode = MODE_1X1; u.load = 1;
      push(u, word_t'($urandom), f[ch][3], f[ch][0], f[ch][1], f[ch][2]);
      for (int m = 0; m < M; m++) begin
        u = UOP_NOP; u.mode = MODE_1X1;
        u.first = (ch == 0); u.rd = (ch > 0); u.rd_idx = IDXW'(m);
        u.wr_s = 1; u.wr_p = (ch == IC - 1); u.wr_idx = IDXW'(m);
        push(u, w[m][ch], word_t'($urandom), word_t'($urandom), word_t'($urandom),
             word_t'($urandom));
      end
    end
    play();
    for (int m = 0; m < M; m++)
      for (int i = 0; i < 4; i++) begin
        longint acc;
        word_t v3, v4;
        acc = 0;
        for (int ch = 0; ch < IC; ch++) acc += longint'(f[ch][i]) * longint'(w[m][ch]);
        read_p(i, m, v3, v4);
        checks++;
        if ((i < 3 && v3 !== sat(acc)) || v4 !== sat(acc)) begin
          failures++;
          $display("FAIL: 1x1 PE %0d filter %0d got %0d/%0d want %0d", i, m, v3, v4, sat(acc));
        end
      end
  endtask

  initial begin
    ctrl = UOP_NOP; ctrl_nxt = UOP_NOP; pr = '0;
    bus = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    test_3x3(70, 10, 3);     // crosses bank 0 / bank 1
    test_1x1(64, 5);
    test_3x3(146, 8, 4);     // crosses bank 1 / bank 2
    test_3x3(0, 56, 2);
    test_1x1(75, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
