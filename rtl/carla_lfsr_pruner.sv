// carla_lfsr_pruner: pseudo-random filter-row selector for semi-structured
// random row-wise pruning.
//
// Pruning removes the same filter row (same input channel, same row index)
// from every filter, so the accelerator can skip the whole row step: no
// weights and no input features are fetched and no cycles are spent on it.
// Which rows were removed is not stored anywhere. Training and hardware run
// the same LFSR from the same seed, one number per filter row in the order
// channel-major, row-minor; a row is kept when its number is above the
// threshold and pruned otherwise.
//
// Interface: `restart` loads `seed` (a zero seed is replaced by 1, since the
// all-zero state would lock up). `keep` is the decision for the current row;
// `advance` moves on to the next row at the clock edge. With `enable` low
// every row is kept. The LFSR itself is a 16-bit Fibonacci register with the
// maximal-length taps 16, 14, 13, 11; its width and polynomial are this
// implementation's choice.
module carla_lfsr_pruner (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        restart,
  input  logic [15:0] seed,
  input  logic [15:0] thresh,
  input  logic        advance,
  output logic [15:0] value,
  output logic        keep
);

  logic [15:0] lfsr;
  logic        fb;

  assign fb    = lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10];
  assign value = lfsr;
  assign keep  = !enable || (lfsr > thresh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lfsr <= 16'h0001;
    else if (restart) lfsr <= (seed == 16'h0) ? 16'h0001 : seed;
    else if (advance) lfsr <= {lfsr[14:0], fb};
  end

endmodule
