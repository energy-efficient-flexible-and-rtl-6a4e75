// tb_carla_sram: self-checking test of one S/P bank (carla_sram, defaults:
// 32-bit words, 75 words).
//
// A reference array follows every write. Random writes and reads are issued
// together for a few thousand cycles; every read must return the reference
// word exactly one clock after its address (synchronous read), a read of the
// address being written in the same cycle must return the old word, and the
// output must hold its value in cycles without a read. The first phase writes
// every address once so that no read sees an unwritten word.
module tb_carla_sram;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 75;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic             clk = 0;
  logic             we = 0, re = 0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [WIDTH-1:0] rdata;

  carla_sram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] expect_q;
  bit               expect_v;
  int checks = 0, failures = 0;

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = $urandom; re = 0;
      ref_mem[a] = wdata;
    end
    @(negedge clk) we = 0;
    expect_v = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [WIDTH-1:0] old_word;
      @(negedge clk);
      // check the result of the previous cycle's read (or that it held)
      if (expect_v) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 6) $display("FAIL: cycle %0d read %h want %h", n, rdata, expect_q);
        end
      end
      we    = ($urandom_range(1) == 1);
      re    = ($urandom_range(3) != 0);
      waddr = AW'($urandom_range(DEPTH - 1));
      raddr = (n % 7 == 0) ? waddr : AW'($urandom_range(DEPTH - 1));
      wdata = $urandom;
      old_word = ref_mem[raddr];
      if (re) begin
        expect_q = old_word;      // read-during-write returns the old word
        expect_v = 1;
      end
      // without a read the output keeps the last value (expect_q unchanged)
      if (we) ref_mem[waddr] = wdata;
    end
    // final read-back of all words
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      re = 1; raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL: read-back %0d got %h want %h", a, rdata, ref_mem[a]);
      end
    end
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
