// Accuracy workload for one output of the complex multiplier, Im Z1 = (Ar X1i + Ai X1r +
// Br X2i + Bi X2r) / 4.
//
// For N = 32 and 256, 3000 trials draw all twelve bipolar input values uniformly from
// [-1, 1] and run cmm_omc (reset before each trial). The error of the output's probability
// estimate against (1 + Im Z1)/2 is averaged. With independent inputs the four product bits
// are independent Bernoulli bits of probability p_k, so the lowest MSE is
// sum p_k (1 - p_k) / (16 N), plus about 1/(3N^2) for truncation from state 0; the counter
// version must be within 15% of it. A version that picks one product bit per cycle with a
// random two-bit select (the circuit with constants, modelled here) must be clearly worse.
module tb_wl_cmm_mse;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int TRIALS = 3000;

  cbit_t a, b, c, d, x1, x2, z1, z2;

  cmm_omc dut (.clk, .rst_n, .a, .b, .c, .d, .x1, .x2, .z1, .z2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (TRIALS * (32 + 256 + 4) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sn(input real p);
    return real'($urandom % 65536) / 65536.0 < p;
  endfunction

  initial begin
    real p [12];     // probabilities of Ar, Ai, Br, Bi, Cr, Ci, Dr, Di, X1r, X1i, X2r, X2i
    real pk [4], exact, e, mse, mse_mux, bound;
    int n, ones, mux_ones;
    logic [3:0] prod;
    {a, b, c, d, x1, x2} = '0;
    for (int k = 5; k <= 8; k += 3) begin
      n = 1 << k;
      mse = 0.0; mse_mux = 0.0; bound = 0.0;
      for (int tr = 0; tr < TRIALS; tr++) begin
        foreach (p[i]) p[i] = real'($urandom % 65536) / 65536.0;
        // probability that an XNOR of independent bits is 1
        pk[0] = p[0] * p[9]  + (1.0 - p[0]) * (1.0 - p[9]);
        pk[1] = p[1] * p[8]  + (1.0 - p[1]) * (1.0 - p[8]);
        pk[2] = p[2] * p[11] + (1.0 - p[2]) * (1.0 - p[11]);
        pk[3] = p[3] * p[10] + (1.0 - p[3]) * (1.0 - p[10]);
        exact = (pk[0] + pk[1] + pk[2] + pk[3]) / 4.0;
        for (int q = 0; q < 4; q++) bound += pk[q] * (1.0 - pk[q]) / (16.0 * n);
        @(negedge clk); rst_n = 1'b0;
        @(negedge clk); rst_n = 1'b1;
        ones = 0; mux_ones = 0;
        for (int t = 0; t < n; t++) begin
          a  = '{re: sn(p[0]), im: sn(p[1])};
          b  = '{re: sn(p[2]), im: sn(p[3])};
          c  = '{re: sn(p[4]), im: sn(p[5])};
          d  = '{re: sn(p[6]), im: sn(p[7])};
          x1 = '{re: sn(p[8]), im: sn(p[9])};
          x2 = '{re: sn(p[10]), im: sn(p[11])};
          prod = {!(a.re ^ x1.im), !(a.im ^ x1.re), !(b.re ^ x2.im), !(b.im ^ x2.re)};
          #1;
          ones += int'(z1.im);
          mux_ones += int'(prod[$urandom % 4]);
          @(negedge clk);
        end
        e = real'(ones) / n - exact;     mse += e * e;
        e = real'(mux_ones) / n - exact; mse_mux += e * e;
      end
      mse /= TRIALS; mse_mux /= TRIALS;
      bound = bound / TRIALS + 1.0 / (3.0 * n * n);
      $display("N=%0d  counter MSE %e  bound %e  multiplexer MSE %e", n, mse, bound, mse_mux);
      check(mse < 1.15 * bound && mse > 0.85 * bound, $sformatf("N=%0d MSE near the bound", n));
      check(mse_mux > 1.5 * mse, $sformatf("N=%0d multiplexer version worse", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
