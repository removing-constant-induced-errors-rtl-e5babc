// Saturating up/down counter, the state machine M of a linear-FSM stochastic circuit.
//
// The state moves one step up on an input 1 and one step down on an input 0, and stays put
// at the ends (s0 on 0, s_{NSTATES-1} on 1). With a Bernoulli input of value X the state
// distribution is a function of X, which a downstream selector turns into the circuit's
// output function.
//
// Interface and timing: `s` is the registered state, updated at the rising edge of `clk`.
// Asynchronous active-low reset to s0 (this design's choice). NSTATES defaults to the
// four-state machine of the published example.
module sat_updown_fsm #(
  parameter int unsigned NSTATES = 4,
  localparam int unsigned SW     = (NSTATES > 1) ? $clog2(NSTATES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x,
  output logic [SW-1:0] s
);

  localparam logic [SW-1:0] SMAX = SW'(NSTATES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    s <= '0;
    else if (x && s != SMAX)       s <= s + 1'b1;
    else if (!x && s != '0)        s <= s - 1'b1;
  end

endmodule
