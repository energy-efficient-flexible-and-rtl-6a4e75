// carla_input_pipeline: the shared input pipeline of CARLA with its feedback
// delay chain.
//
// A chain of pipeline registers passes the value selected at its input one
// stage per clock: stage k (k = 0..NUM_CU-1) is PR<k>, the operand shared by
// the PEs of CU #k. In 3x3 mode this value is an input feature, in 1x1 mode a
// filter weight. Behind PR<NUM_CU-1> the chain continues through five
// further register segments (SEG, 19/84/14/16/26 registers by default). The
// output of PR<NUM_CU-1> and the end of each segment feed back to the input
// multiplexer, so a feature that entered the pipe D cycles ago can be
// re-injected instead of fetched again from DRAM. In 3x3 mode, consecutive
// filter-row steps share all but one input row; the controller selects the
// tap whose delay equals the distance between the two uses of a row.
//
// sel = 0 takes in0 (the DRAM bus Input #0), sel = t (1..6) takes tap t-1,
// whose delay from the multiplexer output is tap_delay(t-1) cycles
// (NUM_CU, NUM_CU+SEG[0], ... NUM_CU+SEG[0]+...+SEG[4]). The chain shifts on
// every clock; there is no enable. The chain structure and segment lengths
// are taken from the architecture figure; the exact points where the
// feedback taps leave the chain are this implementation's reading of it.
module carla_input_pipeline
  import carla_pkg::*;
#(
  parameter int unsigned NUM_CU = 65,
  parameter int unsigned SEG [5] = '{19, 84, 14, 16, 26},
  localparam int unsigned NTAP = 6,
  localparam int unsigned LEN  = NUM_CU + SEG[0] + SEG[1] + SEG[2] + SEG[3] + SEG[4]
) (
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      in0,
  input  logic [2:0] sel,
  output word_t      pr [NUM_CU]
);

  word_t stage [LEN];
  word_t tap   [NTAP];
  word_t mux_out;

  function automatic int unsigned tap_delay(int unsigned t);
    int unsigned d;
    d = NUM_CU;
    for (int unsigned i = 0; i < 5; i++)
      if (i < t) d += SEG[i];
    return d;
  endfunction

  for (genvar t = 0; t < NTAP; t++) begin : g_tap
    assign tap[t] = stage[tap_delay(t) - 1];
  end

  always_comb begin
    mux_out = in0;
    for (int t = 0; t < NTAP; t++)
      if (int'(sel) == t + 1) mux_out = tap[t];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) stage[i] <= '0;
    end else begin
      stage[0] <= mux_out;
      for (int i = 1; i < LEN; i++) stage[i] <= stage[i-1];
    end
  end

  for (genvar k = 0; k < NUM_CU; k++) begin : g_pr
    assign pr[k] = stage[k];
  end

endmodule
