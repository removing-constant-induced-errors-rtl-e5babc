// Testbench for cmm_omc, the constant-free complex matrix-vector multiplier.
//
// All twelve input streams are independent Bernoulli streams with chosen bipolar values. A
// reference model forms each output's four bipolar products (XNOR, inverted for the
// subtracted imaginary products) and runs a modulo-4 counter on their count of 1s; the four
// output bits are compared every cycle. After 40000 cycles each output's bipolar estimate
// 2 * ones / N - 1 must be within 0.03 of the complex product (A X1 + B X2) / 4 and
// (C X1 + D X2) / 4 computed in real arithmetic.
module tb_cmm_omc;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 40000;

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
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bipolar values of Ar, Ai, Br, Bi, Cr, Ci, Dr, Di, X1r, X1i, X2r, X2i
  real val [12] = '{0.8, -0.4, 0.2, 0.6, -0.7, 0.1, 0.5, -0.9, 0.6, 0.3, -0.5, 0.9};

  function automatic logic sn(input real v);
    return ($urandom % 100000) < int'((v + 1.0) / 2.0 * 100000.0);
  endfunction

  function automatic int xn(input logic p, input logic q);
    return int'(!(p ^ q));
  endfunction

  initial begin
    int st [4];
    int cnt [4];
    int ones [4];
    logic [3:0] zr;
    real expv [4], v;
    foreach (st[k]) begin st[k] = 0; ones[k] = 0; end
    {a, b, c, d, x1, x2} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      a  = '{re: sn(val[0]), im: sn(val[1])};
      b  = '{re: sn(val[2]), im: sn(val[3])};
      c  = '{re: sn(val[4]), im: sn(val[5])};
      d  = '{re: sn(val[6]), im: sn(val[7])};
      x1 = '{re: sn(val[8]), im: sn(val[9])};
      x2 = '{re: sn(val[10]), im: sn(val[11])};
      cnt[0] = xn(a.re, x1.re) + 1 - xn(a.im, x1.im) + xn(b.re, x2.re) + 1 - xn(b.im, x2.im);
      cnt[1] = xn(a.re, x1.im) + xn(a.im, x1.re) + xn(b.re, x2.im) + xn(b.im, x2.re);
      cnt[2] = xn(c.re, x1.re) + 1 - xn(c.im, x1.im) + xn(d.re, x2.re) + 1 - xn(d.im, x2.im);
      cnt[3] = xn(c.re, x1.im) + xn(c.im, x1.re) + xn(d.re, x2.im) + xn(d.im, x2.re);
      #1;
      zr = {z2.im, z2.re, z1.im, z1.re};
      for (int k = 0; k < 4; k++) begin
        check(zr[k] == (st[k] + cnt[k] >= 4), $sformatf("output %0d", k));
        ones[k] += int'(zr[k]);
        st[k] = (st[k] + cnt[k]) % 4;
      end
      @(negedge clk);
    end
    expv[0] = (val[0] * val[8] - val[1] * val[9] + val[2] * val[10] - val[3] * val[11]) / 4.0;
    expv[1] = (val[0] * val[9] + val[1] * val[8] + val[2] * val[11] + val[3] * val[10]) / 4.0;
    expv[2] = (val[4] * val[8] - val[5] * val[9] + val[6] * val[10] - val[7] * val[11]) / 4.0;
    expv[3] = (val[4] * val[9] + val[5] * val[8] + val[6] * val[11] + val[7] * val[10]) / 4.0;
    for (int k = 0; k < 4; k++) begin
      v = 2.0 * real'(ones[k]) / N - 1.0;
      check(v - expv[k] < 0.03 && expv[k] - v < 0.03,
            $sformatf("output %0d value %f, expected %f", k, v, expv[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
