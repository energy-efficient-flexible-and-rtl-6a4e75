// tb_carla_input_pipeline: self-checking test of the input pipeline with its
// feedback chain (defaults: 65 pipeline registers, segments 19/84/14/16/26).
//
// The testbench records every value that enters PR0. Each cycle it drives a
// random input and a random multiplexer setting and checks that
//   - PR<k> shows the value that entered k+1 clocks earlier (one register
//     per CU);
//   - with sel = t the value entering PR0 is the one that entered
//     tap_delay(t-1) clocks earlier, with the tap delays 65, 84, 168, 182,
//     198 and 224 given by the register counts of the architecture figure.
module tb_carla_input_pipeline;
  import carla_pkg::*;
  localparam int unsigned NUM_CU = 65;
  localparam int DELAYS [6] = '{65, 84, 168, 182, 198, 224};
  localparam int N = 3000;

  logic       clk = 0, rst_n = 0;
  word_t      in0 = '0;
  logic [2:0] sel = '0;
  word_t      pr [NUM_CU];

  carla_input_pipeline dut (.clk, .rst_n, .in0, .sel, .pr);

  always #5 clk = ~clk;

  word_t hist [N];   // value entering PR0 at clock edge n
  int checks = 0, failures = 0, tap_uses [7];

  initial begin
    for (int t = 0; t < 7; t++) tap_uses[t] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      // drive the cycle that ends with edge n
      in0 = word_t'($urandom);
      sel = (n < 240) ? 3'd0 : 3'($urandom_range(6));
      if (sel == 0) hist[n] = in0;
      else          hist[n] = hist[n - DELAYS[sel - 1]];
      tap_uses[sel]++;
      @(negedge clk);
      // after edge n
      for (int k = 0; k < NUM_CU; k++) begin
        if (n - k >= 0) begin
          checks++;
          if (pr[k] !== hist[n - k]) begin
            failures++;
            if (failures < 6) $display("FAIL: n=%0d PR%0d=%0d want %0d sel=%0d",
                                       n, k, pr[k], hist[n - k], sel);
          end
        end
      end
    end
    for (int t = 0; t < 7; t++) begin
      checks++;
      if (tap_uses[t] == 0) begin
        failures++;
        $display("FAIL: multiplexer input %0d never used", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
