// tb_carla_lfsr_pruner: self-checking test of the pruning LFSR.
//
// Checks, against a reference model of x^16 + x^14 + x^13 + x^11 + 1:
//   - after restart the register holds the seed, and a zero seed becomes 1;
//   - every advance produces the next state and `keep` equals (value > thresh);
//   - the sequence is maximal: it returns to the seed after exactly 65535
//     advances and not before;
//   - without `advance` the state holds; with `enable` low every row is kept;
//   - the fraction of kept rows is close to 1 - thresh/65536.
module tb_carla_lfsr_pruner;
  logic        clk = 0, rst_n = 0;
  logic        enable = 0, restart = 0, advance = 0;
  logic [15:0] seed = '0, thresh = '0;
  logic [15:0] value;
  logic        keep;

  carla_lfsr_pruner dut (.clk, .rst_n, .enable, .restart, .seed, .thresh,
                         .advance, .value, .keep);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [15:0] nxt(logic [15:0] v);
    logic b;
    b = v[15] ^ v[13] ^ v[12] ^ v[10];
    return {v[14:0], b};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [15:0] model, s;
    int period, kept;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // zero seed
    @(negedge clk) begin restart = 1; seed = 16'h0; end
    @(negedge clk) restart = 0;
    check(value === 16'h0001, "zero seed not replaced by 1");
    // random seed, follow the model
    s = 16'($urandom_range(65535, 1));
    @(negedge clk) begin restart = 1; seed = s; enable = 1; thresh = 16'h6000; end
    @(negedge clk) restart = 0;
    check(value === s, "seed not loaded");
    model = s;
    period = 0;
    kept = 0;
    advance = 1;
    do begin
      if (period < 3000) begin
        checks++;
        if (value !== model || keep !== (model > thresh)) begin
          failures++;
          if (failures < 6) $display("FAIL: step %0d value %h keep %0b want %h %0b",
                                     period, value, keep, model, model > thresh);
        end
      end
      if (keep) kept++;
      @(negedge clk);
      model = nxt(model);
      period++;
    end while (value != s && period < 70000);
    advance = 0;
    check(period == 65535, $sformatf("period %0d, 65535 expected", period));
    // 65535 states, the values above 0x6000 are 0x6001..0xffff = 40959
    check(kept == 40959, $sformatf("%0d rows kept over one period, 40959 expected", kept));
    // hold
    repeat (5) @(negedge clk);
    check(value === s, "state changed without advance");
    // enable low keeps everything
    enable = 0;
    thresh = 16'hffff;
    advance = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      checks++;
      if (keep !== 1'b1) failures++;
    end
    advance = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
