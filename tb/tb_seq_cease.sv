// Testbench for seq_cease, the linear-FSM circuit with its random constant removed.
//
// Cycle by cycle, the output and both states are compared with a reference: a saturating
// 0..3 counter M and a modulo-2 counter that jumps 0, 2, 0, 1 states in M's states 0..3. The
// output count must equal N1 + floor(N3 / 2), where Nk counts the cycles spent in state k.
// For Bernoulli inputs of value 0.5 and 0.25 the estimated value must be within 0.02 of
// (X - 2X^2 + 1.5X^3) / (1 - 2X + 2X^2), i.e. 0.375 and 0.2375.
module tb_seq_cease;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 40000;

  logic x, z, omc;
  logic [1:0] s;

  seq_cease dut (.clk, .rst_n, .x, .z, .s, .omc_state(omc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (2 * N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real px);
    int ms, cs, jmp, ones, n1, n3;
    real v, expv;
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    ms = 0; cs = 0; ones = 0; n1 = 0; n3 = 0;
    for (int t = 0; t < N; t++) begin
      x = ($urandom % 10000) < int'(px * 10000.0);
      #1;
      jmp = (ms == 1) ? 2 : (ms == 3) ? 1 : 0;
      check(int'(s) == ms && int'(omc) == cs, "states");
      check(z == (cs + jmp >= 2), "output");
      ones += int'(z);
      n1 += int'(ms == 1); n3 += int'(ms == 3);
      cs = (cs + jmp) % 2;
      if (x && ms < 3) ms++;
      else if (!x && ms > 0) ms--;
      @(negedge clk);
    end
    check(ones == n1 + n3 / 2, "output count");
    v = real'(ones) / N;
    expv = (px - 2.0 * px * px + 1.5 * px * px * px) / (1.0 - 2.0 * px + 2.0 * px * px);
    check(v - expv < 0.02 && expv - v < 0.02, $sformatf("value %f, expected %f", v, expv));
  endtask

  initial begin
    x = 0;
    run(0.5);
    run(0.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
