// Linear-FSM stochastic circuit with its random constant removed.
//
// The original circuit computes Z = (X - 2X^2 + 1.5X^3) / (1 - 2X + 2X^2) with a four-state
// saturating up/down counter M and a four-way multiplexer that, in state S, outputs 0, 1, 0
// or a random SN of value 1/2 (for S = 0, 1, 2, 3). The multiplexer is a combinational
// function of S with coefficients {0, 1, 0, 1/2}; applying constant elimination to it gives
// a modulo-2 counter that advances {0, 2, 0, 1} states for S = 0..3. In S = 1 it always
// overflows (output 1), in S = 3 it outputs 1 on every second visit, otherwise 0. The random
// constant and the two fixed constants are thus replaced by one flip-flop.
//
// Interface and timing: one bit of X per cycle; `z` depends on the current state of M and of
// the modulo-2 counter (Mealy in the counter, registered in M); M then updates on X.
// `omc_state` is the modulo-2 counter's state. Asynchronous active-low reset sets M to s0 and the counter to INIT.
module seq_cease #(
  parameter int unsigned INIT = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [1:0] s,
  output logic       omc_state
);

  logic [1:0] jump;

  // jump of the modulo-2 counter for S = 0, 1, 2, 3: {0, 2, 0, 1}
  always_comb begin
    unique case (s)
      2'd1:    jump = 2'd2;
      2'd3:    jump = 2'd1;
      default: jump = 2'd0;
    endcase
  end

  sat_updown_fsm #(.NSTATES(4)) u_m (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .s    (s)
  );

  omc_counter #(
    .Q   (2),
    .INIT(INIT)
  ) u_omc (
    .clk  (clk),
    .rst_n(rst_n),
    .inc  (jump),
    .z    (z),
    .state(omc_state)
  );

endmodule
