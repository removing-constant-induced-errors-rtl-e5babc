// Testbench for sc_squarer.
//
// Checks Z(t) = X(t) AND X(t-1) every cycle on random input (the first cycle after reset
// sees a stored 0), and that a Bernoulli input of value 0.6 gives a value within 0.02 of
// 0.36 over 10000 bits.
module tb_sc_squarer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 10000;

  logic x, z;

  sc_squarer dut (.clk, .rst_n, .x, .z);

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

  initial begin
    logic prev;
    int ones;
    real v;
    x = 0; prev = 0; ones = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      x = ($urandom % 100) < 60;
      #1;
      check(z == (x & prev), "output");
      ones += int'(z);
      prev = x;
      @(negedge clk);
    end
    v = real'(ones) / N;
    check(v > 0.34 && v < 0.38, $sformatf("value %f, expected 0.36", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
