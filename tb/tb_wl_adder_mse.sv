// Accuracy workload for the constant-free scaled adder: mean-squared error against length.
//
// For each stream length N = 64, 128 and 256, 3000 trials draw X and Y uniformly from [0, 1],
// generate independent Bernoulli streams of those values, and run them through omc_adder
// (reset to s0 before each trial). The error of the estimate ones/N against (X + Y)/2 is
// averaged. For Bernoulli inputs the lowest possible MSE is Var(per-cycle coefficient)/N,
// which averages to 1/(12N) over uniform X and Y. Starting in s0 truncates the leftover
// fraction, which adds about 1/(3N^2); the adder must come within 15% of the sum. In the same trials a multiplexer adder with a
// random select of value 1/2 (the circuit with a constant input) is modelled here: its MSE
// is about 0.2083/N and must be clearly higher.
module tb_wl_adder_mse;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int TRIALS = 3000;

  logic x, y, z, st;

  omc_adder dut (.clk, .rst_n, .x, .y, .z, .state(st));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (TRIALS * (64 + 128 + 256 + 6) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ones, mux_ones;
    real px, py, exact, e_omc, e_mux, bound, est;
    x = 0; y = 0;
    for (int k = 6; k <= 8; k++) begin
      n = 1 << k;
      e_omc = 0.0; e_mux = 0.0;
      for (int tr = 0; tr < TRIALS; tr++) begin
        px = real'($urandom % 65536) / 65536.0;
        py = real'($urandom % 65536) / 65536.0;
        exact = 0.5 * (px + py);
        @(negedge clk); rst_n = 1'b0;
        @(negedge clk); rst_n = 1'b1;
        ones = 0; mux_ones = 0;
        for (int t = 0; t < n; t++) begin
          x = real'($urandom % 65536) / 65536.0 < px;
          y = real'($urandom % 65536) / 65536.0 < py;
          #1;
          ones += int'(z);
          mux_ones += int'($urandom % 2 ? x : y);
          @(negedge clk);
        end
        est = real'(ones) / n - exact;
        e_omc += est * est;
        est = real'(mux_ones) / n - exact;
        e_mux += est * est;
      end
      e_omc /= TRIALS; e_mux /= TRIALS;
      bound = 1.0 / (12.0 * n) + 1.0 / (3.0 * n * n);
      $display("N=%0d  constant-free adder MSE %e  bound %e  multiplexer adder MSE %e", n, e_omc, bound, e_mux);
      check(e_omc < 1.15 * bound && e_omc > 0.85 * bound, $sformatf("N=%0d adder MSE near the bound", n));
      check(e_mux > 1.8 * e_omc, $sformatf("N=%0d multiplexer adder worse", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
