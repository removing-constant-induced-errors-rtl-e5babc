// Accuracy workload on random stochastic functions of two variables and four constants.
//
// Each trial draws a random Boolean function f(x1, x2, r1, r2, r3, r4) (a 64-bit truth table),
// whose stochastic function with all constants of value 1/2 is Z = sum_b g(b) p(b) with
// g(b) = (number of r-combinations giving 1) / 16. The variable inputs get values drawn
// uniformly from [0, 1]. Five versions are compared over N = 32 bits:
//  * k = 0: the combinational circuit with four random constants (modelled here);
//  * k = 1..4: the first k constants removed. The remaining constants still enter as random
//    bits; the removed ones become an omc_counter with Q = 2^k whose jump for the pattern
//    (x1, x2, remaining r) is the number of removed-r combinations that make f = 1.
// The counters start in their middle state (rounding to nearest). Over the trials the MSE
// must fall as more constants are removed, and each version's MSE must be within 20% of
// its Bernoulli lower bound, the trial average of Var(coefficient)/N, where unremoved
// constants count as variables, plus 1/(12N^2) for the rounding of the counter versions.
module tb_wl_random_functions;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int TRIALS = 3000;
  localparam int N      = 32;

  logic [1:0] inc1;
  logic [2:0] inc2;
  logic [3:0] inc3;
  logic [4:0] inc4;
  logic [4:1] z;
  logic       s1;
  logic [1:0] s2;
  logic [2:0] s3;
  logic [3:0] s4;

  omc_counter #(.Q(2),  .INIT(1)) u_k1 (.clk, .rst_n, .inc(inc1), .z(z[1]), .state(s1));
  omc_counter #(.Q(4),  .INIT(2)) u_k2 (.clk, .rst_n, .inc(inc2), .z(z[2]), .state(s2));
  omc_counter #(.Q(8),  .INIT(4)) u_k3 (.clk, .rst_n, .inc(inc3), .z(z[3]), .state(s3));
  omc_counter #(.Q(16), .INIT(8)) u_k4 (.clk, .rst_n, .inc(inc4), .z(z[4]), .state(s4));

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

  logic [63:0] f;    // f[{x1, x2, r4, r3, r2, r1}]

  // number of 1s of f over the k removed constants r1..rk, others fixed by `rest`
  function automatic int jump(input int k, input logic [1:0] xb, input logic [3:0] r);
    int cnt = 0;
    for (int c = 0; c < (1 << k); c++) begin
      logic [3:0] rr;
      rr = (r & ~4'((1 << k) - 1)) | 4'(c);
      cnt += int'(f[{xb, rr}]);
    end
    return cnt;
  endfunction

  initial begin
    real px1, px2, pb [4], exact, e, mse [5], bnd [5], m1, m2, w;
    int ones [5];
    logic [1:0] xb;
    logic [3:0] r;
    foreach (mse[k]) begin mse[k] = 0.0; bnd[k] = 0.0; end
    {inc1, inc2, inc3, inc4} = '0;
    for (int tr = 0; tr < TRIALS; tr++) begin
      f = {$urandom, $urandom};
      px1 = real'($urandom % 65536) / 65536.0;
      px2 = real'($urandom % 65536) / 65536.0;
      pb[0] = (1.0 - px1) * (1.0 - px2); pb[1] = (1.0 - px1) * px2;
      pb[2] = px1 * (1.0 - px2);         pb[3] = px1 * px2;
      exact = 0.0;
      for (int b = 0; b < 4; b++) exact += pb[b] * real'(jump(4, 2'(b), 4'd0)) / 16.0;
      // lower bounds: with k constants removed the per-cycle coefficient is jump_k / 2^k,
      // its pattern being (x1, x2, r_{k+1..4}) with the remaining r equally likely
      for (int k = 0; k <= 4; k++) begin
        m1 = 0.0; m2 = 0.0;
        for (int b = 0; b < 4; b++)
          for (int rest = 0; rest < 16; rest += (1 << k)) begin
            w  = pb[b] / real'(16 >> k);
            m1 += w * real'(jump(k, 2'(b), 4'(rest))) / real'(1 << k);
            m2 += w * (real'(jump(k, 2'(b), 4'(rest))) / real'(1 << k)) ** 2;
          end
        bnd[k] += (m2 - m1 * m1) / N;
      end
      @(negedge clk); rst_n = 1'b0;
      @(negedge clk); rst_n = 1'b1;
      foreach (ones[k]) ones[k] = 0;
      for (int t = 0; t < N; t++) begin
        xb[1] = real'($urandom % 65536) / 65536.0 < px1;
        xb[0] = real'($urandom % 65536) / 65536.0 < px2;
        r = 4'($urandom);
        inc1 = 2'(jump(1, xb, r));
        inc2 = 3'(jump(2, xb, r));
        inc3 = 4'(jump(3, xb, r));
        inc4 = 5'(jump(4, xb, r));
        #1;
        ones[0] += int'(f[{xb, r}]);
        for (int k = 1; k <= 4; k++) ones[k] += int'(z[k]);
        @(negedge clk);
      end
      for (int k = 0; k <= 4; k++) begin
        e = real'(ones[k]) / N - exact;
        mse[k] += e * e;
      end
    end
    for (int k = 0; k <= 4; k++) begin
      mse[k] /= TRIALS; bnd[k] /= TRIALS;
      $display("%0d constants removed: MSE %e, lower bound %e", k, mse[k], bnd[k]);
      if (k > 0) bnd[k] += 1.0 / (12.0 * N * N);
      check(mse[k] < 1.2 * bnd[k] && mse[k] > 0.8 * bnd[k], $sformatf("k=%0d MSE near its bound", k));
      if (k > 0) check(mse[k] < mse[k-1], $sformatf("k=%0d MSE below k=%0d", k, k - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
