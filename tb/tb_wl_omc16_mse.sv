// Accuracy workload for the constant-free modulo-16 circuit and its majority form.
//
// The target is 7/16 - (X1 + X2)/8 - 9/16 X1 X2 in inverted-bipolar format, with X1 and X2
// independent streams of the same value; in probability terms Z = 11/16 (1-X)^2 + 7/16 X^2.
// For N = 32, 4000 trials draw X uniformly from [0, 1] and run both omc_strauss16 and
// omc_maj16 (reset to s0 each trial). Their outputs must agree bit for bit, and the MSE must
// be within 15% of the Bernoulli lower bound, the average of Var(per-cycle coefficient)/N,
// 0.0685/32 = 0.00214, plus 1/(3N^2) for truncation from s0 (the published figure is an
// MSE of about 0.002 at N = 32).
module tb_wl_omc16_mse;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int TRIALS = 4000;
  localparam int N      = 32;

  logic x1, x2, za, zb;
  logic [3:0]  sa;
  logic [15:0] cb;

  omc_strauss16 dut_a (.clk, .rst_n, .x1, .x2, .z(za), .state(sa));
  omc_maj16     dut_b (.clk, .rst_n, .x1, .x2, .z(zb), .cnt(cb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (TRIALS * (N + 2) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, diff;
    real px, exact, e, mse, bound;
    x1 = 0; x2 = 0; mse = 0.0; diff = 0;
    for (int tr = 0; tr < TRIALS; tr++) begin
      px = real'($urandom % 65536) / 65536.0;
      exact = 11.0 / 16.0 * (1.0 - px) * (1.0 - px) + 7.0 / 16.0 * px * px;
      @(negedge clk); rst_n = 1'b0;
      @(negedge clk); rst_n = 1'b1;
      ones = 0;
      for (int t = 0; t < N; t++) begin
        x1 = real'($urandom % 65536) / 65536.0 < px;
        x2 = real'($urandom % 65536) / 65536.0 < px;
        #1;
        ones += int'(za);
        diff += int'(za != zb);
        @(negedge clk);
      end
      e = real'(ones) / N - exact;
      mse += e * e;
    end
    mse /= TRIALS;
    // average over X of E[g^2] - E[g]^2: 170/768 - (121/5 + 49/5 + 154/30)/256
    bound = (170.0 / 768.0 - (121.0 / 5.0 + 49.0 / 5.0 + 154.0 / 30.0) / 256.0) / N
            + 1.0 / (3.0 * N * N);
    $display("N=%0d  MSE %e  bound %e", N, mse, bound);
    check(diff == 0, "majority form equals counter form");
    check(mse < 1.15 * bound && mse > 0.85 * bound, "MSE near the lower bound");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
