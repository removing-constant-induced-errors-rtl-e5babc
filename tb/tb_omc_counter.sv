// Testbench for omc_counter: random jumps against a reference modulo counter.
//
// Two instances are run: the default modulo-16 counter starting in s0 (truncating) and a
// modulo-5 counter starting in its middle state s2 (rounding). Every cycle the overflow bit
// and the state are compared with an arithmetic model (state + jump, wrap at Q). At the end
// the number of output 1s is checked against floor((sum of jumps + INIT) / Q), the closed
// form for the output count of a modulo-counting circuit. Jumps of 0 and of Q are forced to
// occur. Output is compared after the inputs settle, before the clock edge.
module tb_omc_counter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int NCYC = 4000;

  logic [4:0] inc_a;
  logic       z_a;
  logic [3:0] st_a;
  logic [2:0] inc_b;
  logic       z_b;
  logic [2:0] st_b;

  omc_counter dut_a (.clk, .rst_n, .inc(inc_a), .z(z_a), .state(st_a));
  omc_counter #(.Q(5), .INIT(2)) dut_b (.clk, .rst_n, .inc(inc_b), .z(z_b), .state(st_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_a, ref_b, sum_a, sum_b, ones_a, ones_b, full_a, zero_a;
    ref_a = 0; ref_b = 2; sum_a = 0; sum_b = 0; ones_a = 0; ones_b = 0; full_a = 0; zero_a = 0;
    inc_a = '0; inc_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      @(negedge clk);
      inc_a = 5'($urandom_range(16, 0));
      if (t % 97 == 0) inc_a = 5'd16;
      if (t % 89 == 0) inc_a = 5'd0;
      inc_b = 3'($urandom_range(5, 0));
      #1;
      check(z_a == (ref_a + int'(inc_a) >= 16), $sformatf("A overflow, state %0d jump %0d", ref_a, inc_a));
      check(int'(st_a) == ref_a, $sformatf("A state %0d, expected %0d", st_a, ref_a));
      check(z_b == (ref_b + int'(inc_b) >= 5), "B overflow");
      check(int'(st_b) == ref_b, "B state");
      if (inc_a == 16) full_a++;
      if (inc_a == 0)  zero_a++;
      sum_a += int'(inc_a); sum_b += int'(inc_b);
      ones_a += int'(z_a);  ones_b += int'(z_b);
      ref_a = (ref_a + int'(inc_a)) % 16;
      ref_b = (ref_b + int'(inc_b)) % 5;
    end
    check(ones_a == sum_a / 16, $sformatf("A ones %0d, expected %0d", ones_a, sum_a / 16));
    check(ones_b == (sum_b + 2) / 5, $sformatf("B ones %0d, expected %0d", ones_b, (sum_b + 2) / 5));
    check(full_a > 0 && zero_a > 0, "jumps of 0 and Q applied");
    // reset returns to INIT
    @(negedge clk); rst_n = 1'b0; #1;
    check(st_a == 4'd0 && st_b == 3'd2, "reset state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
