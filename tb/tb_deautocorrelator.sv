// Testbench for deautocorrelator, the shuffling buffer.
//
// A two-flip-flop and an eight-flip-flop instance are fed a strongly autocorrelated stream
// (alternating runs) with random selects. Each cycle the output must be the bit that a
// reference buffer holds at the selected position, and that position then takes the input.
// Stream value is conserved: 1s out plus 1s held equals 1s in. Every flip-flop must be
// selected at least once.
module tb_deautocorrelator;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 3000;

  logic       d, q2, q8;
  logic       r2;
  logic [2:0] r8;

  deautocorrelator          dut2 (.clk, .rst_n, .r(r2), .d, .q(q2));
  deautocorrelator #(.K(8)) dut8 (.clk, .rst_n, .r(r8), .d, .q(q8));

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
    logic [1:0] m2;
    logic [7:0] m8;
    int in1, out2, out8;
    int used8 [8];
    d = 0; r2 = 0; r8 = 0;
    m2 = '0; m8 = '0; in1 = 0; out2 = 0; out8 = 0;
    foreach (used8[i]) used8[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      d  = ((t / 3) % 2 == 0) ? 1'b1 : 1'($urandom % 4 == 0);
      r2 = 1'($urandom);
      r8 = 3'($urandom);
      #1;
      check(q2 == m2[r2], "two-bit output");
      check(q8 == m8[r8], "eight-bit output");
      in1 += int'(d); out2 += int'(q2); out8 += int'(q8);
      used8[r8]++;
      m2[r2] = d;
      m8[r8] = d;
      @(negedge clk);
    end
    check(out2 + $countones(m2) == in1, "two-bit: value conserved");
    check(out8 + $countones(m8) == in1, "eight-bit: value conserved");
    foreach (used8[i]) check(used8[i] > 0, $sformatf("flip-flop %0d selected", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
