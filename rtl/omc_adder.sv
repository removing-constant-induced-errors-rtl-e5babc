// Constant-free stochastic scaled adder, Z = (X + Y) / 2.
//
// The conventional scaled adder is a multiplexer whose select is a random SN of value 1/2;
// that constant adds its own random fluctuation to Z. Here the constant is replaced by one
// bit of memory. The flip-flop is a modulo-2 counter that counts the cycles in which exactly
// one of X and Y is 1: the first such cycle moves it from s0 to s1 with output 0, the second
// returns it to s0 with output 1. Inputs 11 always give 1 and 00 always give 0. Hence the
// next state is state ^ x ^ y and the output is the majority of (x, y, state): exactly one
// 1 is produced for every two cycles of 01 or 10, whatever the order or correlation of the
// inputs.
//
// Interface and timing: one bit of X and Y per cycle; `z` is combinational from the inputs
// and the current state (Mealy). Asynchronous active-low reset loads INIT (0 = s0, which
// truncates a leftover half; 1 = s1, which rounds it up). The state graph and the
// majority-gate structure follow the published circuit; reset style is this design's choice.
module omc_adder #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  input  logic y,
  output logic z,
  output logic state
);

  assign z = (x & y) | (x & state) | (y & state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= INIT;
    else        state <= state ^ x ^ y;
  end

endmodule
