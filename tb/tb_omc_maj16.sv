// Testbench for omc_maj16, the majority-gate form of the modulo-16 (11, 0, 7) circuit.
//
// Random inputs (including long runs of one pattern) are applied to instances starting in s0
// and in s8. Each cycle the output must equal the overflow of a reference modulo-16 counter
// (state + 11, 0 or 7 >= 16) and the 16 counter lines must be the thermometer code of the
// reference state. The output count is checked against floor((11 N00 + 7 N11 + INIT) / 16).
module tb_omc_maj16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 6000;

  logic x1, x2, za, zb;
  logic [15:0] ca, cb;

  omc_maj16             dut_a (.clk, .rst_n, .x1, .x2, .z(za), .cnt(ca));
  omc_maj16 #(.INIT(8)) dut_b (.clk, .rst_n, .x1, .x2, .z(zb), .cnt(cb));

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

  function automatic int jump(input logic a, input logic b);
    return (a && b) ? 7 : (!a && !b) ? 11 : 0;
  endfunction

  function automatic logic [15:0] therm(input int n);
    return 16'((32'd1 << n) - 1);
  endfunction

  initial begin
    int ra, rb, acc, oa, ob, mode;
    x1 = 0; x2 = 0;
    ra = 0; rb = 8; acc = 0; oa = 0; ob = 0; mode = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      if (t % 50 == 0) mode = $urandom_range(3, 0);
      if (mode == 0) {x1, x2} = 2'($urandom);
      else           {x1, x2} = 2'(mode);   // runs of 01, 10, 11
      #1;
      check(za == (ra + jump(x1, x2) >= 16), $sformatf("output, state %0d", ra));
      check(ca == therm(ra), $sformatf("lines %b, state %0d", ca, ra));
      check(zb == (rb + jump(x1, x2) >= 16) && cb == therm(rb), "instance starting in s8");
      oa += int'(za); ob += int'(zb); acc += jump(x1, x2);
      ra = (ra + jump(x1, x2)) % 16;
      rb = (rb + jump(x1, x2)) % 16;
      @(negedge clk);
    end
    check(oa == acc / 16, "output count from s0");
    check(ob == (acc + 8) / 16, "output count from s8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
