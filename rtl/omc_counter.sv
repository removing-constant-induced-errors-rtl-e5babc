// Generic optimal modulo-counting (OMC) circuit: the finite-state machine produced by the
// constant-elimination method for a stochastic function Z = sum_i (a_i/Q) p(b_i).
//
// The machine is a modulo-Q counter. In each cycle the surrounding logic maps the input bit
// pattern b_i seen in that cycle to its jump a_i (the pattern's coefficient times Q) and
// presents it on `inc`; the counter jumps forward that many states. When the jump carries
// the count past Q-1 the counter wraps, keeping the overflow amount, and `z` is 1 in that
// same cycle; otherwise `z` is 0. Over N cycles the number of 1s on `z` is therefore
// floor((sum_i a_i N_i + INIT) / Q): the fractional coefficients a_i/Q, for which a
// combinational circuit would need random constant inputs, are accumulated exactly, so no
// random fluctuation is added beyond that of the inputs themselves.
//
// INIT sets the rounding policy: INIT = 0 truncates the fractional part of the expected
// number of 1s, INIT = Q/2 rounds it to the nearest integer. `inc` must lie in 0..Q; a jump
// of Q always overflows and leaves the state unchanged.
//
// Interface and timing: `z` is a Mealy output, a combinational function of the current state
// and `inc`; the state updates on the rising edge of `clk`. The asynchronous active-low reset
// loads INIT. Q = 16 is the size of the published modulo-16 example; presenting the jump as
// an input rather than a table parameter, and the reset style, are this design's choices.
module omc_counter #(
  parameter int unsigned Q    = 16,
  parameter int unsigned INIT = 0,
  localparam int unsigned SW  = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned IW  = $clog2(Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] inc,
  output logic          z,
  output logic [SW-1:0] state
);

  localparam int unsigned AW = (SW > IW ? SW : IW) + 1;

  logic [AW-1:0] sum;     // state + jump, at most 2Q-1

  always_comb begin
    sum = AW'(state) + AW'(inc);
    z   = (sum >= AW'(Q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SW'(INIT);
    else if (z)  state <= SW'(sum - AW'(Q));
    else         state <= SW'(sum);
  end

  initial assert (INIT < Q) else $error("omc_counter: INIT must be below Q");

  // a jump larger than Q would skip an overflow
  a_jump_in_range: assert property (@(posedge clk) 32'(inc) <= Q)
    else $error("omc_counter: jump %0d exceeds Q", inc);

endmodule
