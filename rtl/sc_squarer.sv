// Sequential stochastic squarer, Z(t) = X(t) AND X(t-1).
//
// A flip-flop delays the input by one cycle and an AND gate multiplies the current bit with
// the previous one. If successive input bits are independent, p(Z = 1) = X * X. It is the
// standard example of a circuit that fails on autocorrelated inputs, and the downstream
// circuit in the chain constant-free adder -> de-autocorrelator -> squarer.
//
// Interface and timing: `z` is combinational from `x` and the stored previous bit. The
// flip-flop resets to 0 (this design's choice), so the first output bit is 0.
module sc_squarer (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic x_prev;

  assign z = x & x_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_prev <= 1'b0;
    else        x_prev <= x;
  end

endmodule
