// Testbench for omc_strauss16, the constant-free form of Z = 11/16 p(00) + 7/16 p(11).
//
// Random Bernoulli inputs (values 0.3 and 0.6, and 0.5/0.5) are applied to a truncating
// (INIT = 0) and a rounding (INIT = 8) instance. Each cycle the output and state are compared
// with a modulo-16 model that adds 11, 0 or 7 for 0, 1 or 2 input 1s. After each run the
// output count must equal floor((11 N00 + 7 N11 + INIT) / 16) exactly, and the estimated
// value must be within 0.02 of the expected value 11/16 (1-X1)(1-X2) + 7/16 X1 X2.
module tb_omc_strauss16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 8192;

  logic x1, x2, za, zb;
  logic [3:0] sa, sb;

  omc_strauss16              dut_a (.clk, .rst_n, .x1, .x2, .z(za), .state(sa));
  omc_strauss16 #(.INIT(8))  dut_b (.clk, .rst_n, .x1, .x2, .z(zb), .state(sb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (4 * N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int jump(input logic a, input logic b);
    return (a && b) ? 7 : (!a && !b) ? 11 : 0;
  endfunction

  task automatic run(input real p1, input real p2);
    int ra, rb, acc, oa, ob;
    real expv;
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    ra = 0; rb = 8; acc = 0; oa = 0; ob = 0;
    for (int t = 0; t < N; t++) begin
      x1 = ($urandom % 10000) < int'(p1 * 10000.0);
      x2 = ($urandom % 10000) < int'(p2 * 10000.0);
      #1;
      check(za == (ra + jump(x1, x2) >= 16) && int'(sa) == ra, "truncating instance");
      check(zb == (rb + jump(x1, x2) >= 16) && int'(sb) == rb, "rounding instance");
      oa += int'(za); ob += int'(zb); acc += jump(x1, x2);
      ra = (ra + jump(x1, x2)) % 16;
      rb = (rb + jump(x1, x2)) % 16;
      @(negedge clk);
    end
    check(oa == acc / 16, "output count, truncating");
    check(ob == (acc + 8) / 16, "output count, rounding");
    expv = 11.0 / 16.0 * (1.0 - p1) * (1.0 - p2) + 7.0 / 16.0 * p1 * p2;
    check((real'(oa) / N - expv) < 0.02 && (expv - real'(oa) / N) < 0.02,
          $sformatf("value %f, expected %f", real'(oa) / N, expv));
  endtask

  initial begin
    x1 = 0; x2 = 0;
    run(0.3, 0.6);
    run(0.5, 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
