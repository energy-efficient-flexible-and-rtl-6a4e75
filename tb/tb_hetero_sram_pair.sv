// tb_hetero_sram_pair: self-checking test of the heterogeneous SRAM pair
// (defaults: 448-word private 32-bit SRAMs, shared 896 x 16 output SRAM).
//
// Phase 1 (xfer = 0): both CUs accumulate random partial sums in their
// private SRAMs (read-modify-write, checked against a model) and write
// finished 16-bit outputs into their halves of the shared SRAM; reads on
// the DRAM side are attempted and must not change x_rdata.
// Phase 2 (xfer = 1): both ports read the whole shared SRAM, two words per
// cycle; every word must match what its CU wrote, at DEPTH*cu + address, and
// CU writes attempted in this phase must be ignored. The transfer must take
// DEPTH cycles for 2*DEPTH words.
module tb_hetero_sram_pair;
  localparam int unsigned DEPTH = 448;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned PAW   = $clog2(2 * DEPTH);

  logic           clk = 0, xfer = 0;
  logic           m_we [2], m_re [2], p_we [2], x_re [2];
  logic [AW-1:0]  m_waddr [2], m_raddr [2], p_waddr [2];
  logic [31:0]    m_wdata [2], m_rdata [2];
  logic [15:0]    p_wdata [2], x_rdata [2];
  logic [PAW-1:0] x_raddr [2];

  hetero_sram_pair dut (.clk, .xfer, .m_we, .m_waddr, .m_wdata, .m_re, .m_raddr, .m_rdata,
                        .p_we, .p_waddr, .p_wdata, .x_re, .x_raddr, .x_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] m_ref [2][DEPTH];
  logic [15:0] p_ref [2 * DEPTH];

  task automatic idle();
    for (int i = 0; i < 2; i++) begin
      m_we[i] = 0; m_re[i] = 0; p_we[i] = 0; x_re[i] = 0;
      m_waddr[i] = '0; m_raddr[i] = '0; p_waddr[i] = '0; x_raddr[i] = '0;
      m_wdata[i] = '0; p_wdata[i] = '0;
    end
  endtask

  initial begin
    logic [15:0] held [2];
    int cycles;
    idle();
    // initialise the private SRAMs
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        m_we[i] = 1; m_waddr[i] = AW'(a); m_wdata[i] = $urandom; m_ref[i][a] = m_wdata[i];
      end
    end
    @(negedge clk) idle();
    // phase 1: accumulate in M (read, then add and write back), write P
    for (int a = 0; a < DEPTH; a++) begin
      logic [31:0] add [2];
      for (int i = 0; i < 2; i++) begin
        m_re[i] = 1; m_raddr[i] = AW'(a); m_we[i] = 0; p_we[i] = 0;
      end
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (m_rdata[i] !== m_ref[i][a]) begin
          failures++;
          if (failures < 6) $display("FAIL: M%0d[%0d] = %h want %h", i, a, m_rdata[i], m_ref[i][a]);
        end
        add[i] = $urandom;
        m_re[i] = 0;
        m_we[i] = 1; m_waddr[i] = AW'(a); m_wdata[i] = m_rdata[i] + add[i];
        m_ref[i][a] = m_ref[i][a] + add[i];
        p_we[i] = 1; p_waddr[i] = AW'(a); p_wdata[i] = m_wdata[i][23:8];
        p_ref[i * DEPTH + a] = p_wdata[i];
        x_re[i] = 1; x_raddr[i] = PAW'(a);        // must be ignored while computing
      end
      @(negedge clk);
      idle();
    end
    held = x_rdata;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (x_rdata[i] !== held[i]) begin
        failures++;
        $display("FAIL: DRAM-side read happened while computing");
      end
    end
    // phase 2: transfer, two words per cycle; CU writes must be ignored
    xfer = 1;
    cycles = 0;
    for (int a = 0; a < DEPTH; a++) begin
      x_re[0] = 1; x_raddr[0] = PAW'(a);
      x_re[1] = 1; x_raddr[1] = PAW'(DEPTH + a);
      p_we[0] = 1; p_waddr[0] = AW'(a); p_wdata[0] = ~p_ref[a];
      p_we[1] = 1; p_waddr[1] = AW'(a); p_wdata[1] = ~p_ref[DEPTH + a];
      @(negedge clk);
      cycles++;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (x_rdata[i] !== p_ref[i * DEPTH + a]) begin
          failures++;
          if (failures < 6) $display("FAIL: P[%0d] = %h want %h", i * DEPTH + a,
                                     x_rdata[i], p_ref[i * DEPTH + a]);
        end
      end
    end
    idle();
    // a second pass over the first words shows the CU writes were ignored
    for (int a = 0; a < 4; a++) begin
      x_re[0] = 1; x_raddr[0] = PAW'(a);
      x_re[1] = 1; x_raddr[1] = PAW'(DEPTH + a);
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (x_rdata[i] !== p_ref[i * DEPTH + a]) begin
          failures++;
          $display("FAIL: CU write landed during transfer at %0d", i * DEPTH + a);
        end
      end
    end
    idle();
    checks++;
    if (cycles != DEPTH) begin
      failures++;
      $display("FAIL: transfer took %0d cycles", cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
