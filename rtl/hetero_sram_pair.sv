// hetero_sram_pair: heterogeneous SRAM configuration for two neighbouring
// convolution units of the baseline row-wise accelerator.
//
// Instead of a ping-pong pair of identical wide SRAMs per CU, each CU keeps
// one private SRAM M (DEPTH words of PW bits) for its partial sums, and the
// two CUs share one output SRAM P that is twice as deep and only OW bits
// wide. Finished outputs are the only thing stored in P, so the narrow word
// suffices; one deep narrow macro costs less area and power than two
// shallow wide ones.
//
// The shared P macro is dual-ported and each port belongs to one CU. While
// a pass is computed (xfer = 0) both ports write: CU #0 into the lower half
// (word address = p_addr), CU #1 into the upper half (DEPTH + p_addr).
// While the results go to DRAM (xfer = 1) both ports read, each at its own
// full-range address, so two output words leave per cycle; meanwhile the
// CUs already accumulate the next pass in their M SRAMs.
//
// Timing: all reads are synchronous (data one clock after the address).
// Writes on port i are ignored while xfer = 1 and reads while xfer = 0.
// The structure (private wide M, shared 2x deep narrow P, both ports write
// during computation and read during transfer) follows the description of
// the memory configuration; the half-per-CU address split is this
// implementation's choice.
module hetero_sram_pair #(
  parameter int unsigned DEPTH = 448,  // words per private SRAM and per half of P
  parameter int unsigned PW    = 32,   // partial-sum width (SRAM M)
  parameter int unsigned OW    = 16,   // output width (shared SRAM P)
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned PAW  = $clog2(2 * DEPTH)
) (
  input  logic          clk,
  input  logic          xfer,              // 0: CUs write P, 1: P is read out
  // private partial-sum SRAMs M, one per CU
  input  logic          m_we    [2],
  input  logic [AW-1:0] m_waddr [2],
  input  logic [PW-1:0] m_wdata [2],
  input  logic          m_re    [2],
  input  logic [AW-1:0] m_raddr [2],
  output logic [PW-1:0] m_rdata [2],
  // shared output SRAM P: CU side
  input  logic          p_we    [2],
  input  logic [AW-1:0] p_waddr [2],
  input  logic [OW-1:0] p_wdata [2],
  // shared output SRAM P: DRAM side
  input  logic          x_re    [2],
  input  logic [PAW-1:0] x_raddr [2],
  output logic [OW-1:0] x_rdata [2]
);

  for (genvar i = 0; i < 2; i++) begin : g_m
    carla_sram #(.WIDTH(PW), .DEPTH(DEPTH)) u_m (
      .clk, .we(m_we[i]), .waddr(m_waddr[i]), .wdata(m_wdata[i]),
      .re(m_re[i]), .raddr(m_raddr[i]), .rdata(m_rdata[i]));
  end

  // shared 2*DEPTH x OW macro with two read/write ports
  logic [OW-1:0] p_mem [2 * DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      if (!xfer && p_we[i]) p_mem[i * DEPTH + int'(p_waddr[i])] <= p_wdata[i];
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_x
    always_ff @(posedge clk) begin
      if (xfer && x_re[i]) x_rdata[i] <= p_mem[x_raddr[i]];
    end
  end

endmodule
