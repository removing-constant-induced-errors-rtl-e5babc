// Testbench for omc_adder, the constant-free scaled adder Z = (X + Y) / 2.
//
// Directed cases: the worked 8-bit example from both initial states (truncating: Z =
// 00101010, ending in s1; rounding up: Z = 01010110, ending in s0), two fully anti-correlated
// 12-bit streams whose scaled sum is exactly 6/12, and the same with two bits of X flipped
// (5/12). Streams are written first bit on the left. Then random inputs are compared cycle by
// cycle with the state graph (parity of pattern-01/10 count, majority output), and the output
// count with floor((N01 + N10 + 2 N11 + INIT) / 2).
module tb_omc_adder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic x, y;
  logic z0, s0, z1, s1;

  omc_adder                 dut0 (.clk, .rst_n, .x, .y, .z(z0), .state(s0));
  omc_adder #(.INIT(1'b1))  dut1 (.clk, .rst_n, .x, .y, .z(z1), .state(s1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
  endtask

  // apply two streams of n bits (MSB = first bit), collect both outputs
  task automatic run(input int n, input logic [15:0] xs, input logic [15:0] ys,
                     output logic [15:0] zs0, output logic [15:0] zs1);
    zs0 = '0; zs1 = '0;
    do_reset();
    for (int i = n - 1; i >= 0; i--) begin
      x = xs[i]; y = ys[i];
      #1;
      zs0[i] = z0; zs1[i] = z1;
      @(negedge clk);
    end
  endtask

  initial begin
    logic [15:0] za, zb;
    int st, ones, n1, n2;
    x = 0; y = 0;
    run(8, 16'b00011010, 16'b01100110, za, zb);
    check(za[7:0] == 8'b00101010, $sformatf("example from s0: %b", za[7:0]));
    check(s0 == 1'b1, "example from s0 ends in s1");
    check(zb[7:0] == 8'b01010110, $sformatf("example from s1: %b", zb[7:0]));
    check(s1 == 1'b0, "example from s1 ends in s0");
    run(12, 16'b010101010101, 16'b101010101010, za, zb);
    check($countones(za[11:0]) == 6, "anti-correlated inputs give 6/12");
    run(12, 16'b010101010000, 16'b101010101010, za, zb);
    check($countones(za[11:0]) == 5, "two flipped bits give 5/12");

    // random streams against the state graph
    do_reset();
    st = 0; ones = 0; n1 = 0; n2 = 0;
    for (int t = 0; t < 5000; t++) begin
      x = 1'($urandom); y = 1'($urandom);
      #1;
      check(z0 == ((int'(x) + int'(y) + st) >= 2), "random: output");
      check(int'(s0) == st, "random: state");
      ones += int'(z0);
      n1 += int'(x ^ y); n2 += int'(x & y);
      st = st ^ int'(x) ^ int'(y);
      @(negedge clk);
    end
    check(ones == (n1 + 2 * n2) / 2, "random: output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
