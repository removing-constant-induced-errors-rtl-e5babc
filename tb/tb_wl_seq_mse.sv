// Accuracy workload for the linear-FSM circuit with and without its random constant.
//
// For N = 16, 64 and 256, 2000 trials draw X uniformly from [0, 1] and run seq_cease (reset
// before each trial). The original circuit is modelled here from the same state S of the
// up/down counter: it outputs 0, 1, 0 or a fresh random bit of value 1/2 for S = 0..3.
// Both estimates are compared with (X - 2X^2 + 1.5X^3) / (1 - 2X + 2X^2). The version with
// the counter must have the lower MSE at every length. Both share the up/down counter's
// start-up transient, so neither reaches the combinational lower bound.
module tb_wl_seq_mse;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int TRIALS = 2000;

  logic x, z, omc;
  logic [1:0] s;

  seq_cease dut (.clk, .rst_n, .x, .z, .s, .omc_state(omc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (TRIALS * (16 + 64 + 256 + 6) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ones, base_ones;
    real px, exact, e, mse_c, mse_b;
    x = 0;
    for (int k = 4; k <= 8; k += 2) begin
      n = 1 << k;
      mse_c = 0.0; mse_b = 0.0;
      for (int tr = 0; tr < TRIALS; tr++) begin
        px = real'($urandom % 65536) / 65536.0;
        exact = (px - 2.0 * px * px + 1.5 * px * px * px) / (1.0 - 2.0 * px + 2.0 * px * px);
        @(negedge clk); rst_n = 1'b0;
        @(negedge clk); rst_n = 1'b1;
        ones = 0; base_ones = 0;
        for (int t = 0; t < n; t++) begin
          x = real'($urandom % 65536) / 65536.0 < px;
          #1;
          ones += int'(z);
          base_ones += (s == 2'd1) ? 1 : (s == 2'd3) ? int'($urandom % 2) : 0;
          @(negedge clk);
        end
        e = real'(ones) / n - exact;      mse_c += e * e;
        e = real'(base_ones) / n - exact; mse_b += e * e;
      end
      mse_c /= TRIALS; mse_b /= TRIALS;
      $display("N=%0d  with counter MSE %e  with random constant MSE %e", n, mse_c, mse_b);
      check(mse_c < mse_b, $sformatf("N=%0d counter version more accurate", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
