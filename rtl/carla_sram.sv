// carla_sram: one dual-port SRAM bank of a CARLA convolution unit.
//
// Each PE owns a pair of banks: an S bank (32-bit words) that accumulates
// partial sums during a partition, and a P bank (16-bit words) that receives
// the finished outputs and is emptied to DRAM while the next partition is
// computed. The design uses dual-port macros, so this model has one write
// port and one read port that work in the same cycle. A read returns its word
// one clock after the address (synchronous read, as a compiled SRAM macro).
// A read and a write of the same address in one cycle return the old word.
// Contents are not reset; the controller never reads a word it has not
// written in the same partition.
module carla_sram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 75,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
