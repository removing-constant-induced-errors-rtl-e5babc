// Testbench for sat_updown_fsm, the four-state saturating up/down counter.
//
// Random input with long runs of 1s and 0s; each cycle the state is compared with a
// reference that moves up on 1 and down on 0 and saturates at 0 and 3. Both saturations must
// be exercised.
module tb_sat_updown_fsm;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 3000;

  logic x;
  logic [1:0] s;

  sat_updown_fsm dut (.clk, .rst_n, .x, .s);

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
    int st, sat_lo, sat_hi, bias;
    x = 0; st = 0; sat_lo = 0; sat_hi = 0; bias = 50;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      if (t % 40 == 0) bias = $urandom_range(90, 10);
      x = ($urandom % 100) < bias;
      #1;
      check(int'(s) == st, $sformatf("state %0d, expected %0d", s, st));
      if (x && st == 3) sat_hi++;
      if (!x && st == 0) sat_lo++;
      if (x && st < 3) st++;
      else if (!x && st > 0) st--;
      @(negedge clk);
    end
    check(sat_hi > 0 && sat_lo > 0, "both saturations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
