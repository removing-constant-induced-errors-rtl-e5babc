// Constant-free stochastic circuits, side by side.
//
// Four independent designs share only the clock and reset; each has its own ports.
//  * Scaled-adder chain: the constant-free adder Z = (X + Y)/2 feeds a shuffling
//    de-autocorrelator of DEAC_K flip-flops, whose output feeds a sequential squarer. The
//    adder's output is autocorrelated; the shuffle makes it usable by the squarer.
//  * The polynomial 7/16 - (X1 + X2)/8 - 9/16 X1 X2 (inverted bipolar), in two equivalent
//    forms driven by the same inputs: adder plus modulo-16 counter, and majority gate with a
//    thermometer-coded counter. Their outputs are identical bit for bit.
//  * The linear-FSM circuit (X - 2X^2 + 1.5X^3) / (1 - 2X + 2X^2) with its random constant
//    replaced by a modulo-2 counter.
//  * The complex matrix-vector multiplier with four modulo-4 counters.
//
// Interface and timing: one bit of every stochastic number per clock cycle; all outputs are
// combinational from the current inputs and the registered states (no pipeline latency).
// `deac_r` is the random select of the de-autocorrelator and must come from a random source
// outside this design. Asynchronous active-low reset puts every counter in its initial state
// (s0, truncating rounding). DEAC_K = 8 is the larger of the two published shuffle sizes.
module cease_top
  import sc_pkg::*;
#(
  parameter int unsigned DEAC_K = 8,
  localparam int unsigned RW    = $clog2(DEAC_K)
) (
  input  logic          clk,
  input  logic          rst_n,
  // scaled-adder chain
  input  logic          add_x,
  input  logic          add_y,
  input  logic [RW-1:0] deac_r,
  output logic          add_z,
  output logic          sq_x,
  output logic          sq_z,
  // modulo-16 polynomial, both forms
  input  logic          st_x1,
  input  logic          st_x2,
  output logic          st_z,
  output logic          maj_z,
  // linear-FSM circuit
  input  logic          seq_x,
  output logic          seq_z,
  // complex matrix-vector multiplier
  input  cbit_t         cmm_a,
  input  cbit_t         cmm_b,
  input  cbit_t         cmm_c,
  input  cbit_t         cmm_d,
  input  cbit_t         cmm_x1,
  input  cbit_t         cmm_x2,
  output cbit_t         cmm_z1,
  output cbit_t         cmm_z2
);

  logic        add_state;
  logic [15:0] maj_cnt;
  logic [1:0]  seq_s;
  logic        seq_omc;
  logic [3:0]  st_state;

  omc_adder u_adder (
    .clk(clk), .rst_n(rst_n), .x(add_x), .y(add_y), .z(add_z), .state(add_state)
  );

  deautocorrelator #(.K(DEAC_K)) u_deac (
    .clk(clk), .rst_n(rst_n), .r(deac_r), .d(add_z), .q(sq_x)
  );

  sc_squarer u_sq (
    .clk(clk), .rst_n(rst_n), .x(sq_x), .z(sq_z)
  );

  omc_strauss16 u_st (
    .clk(clk), .rst_n(rst_n), .x1(st_x1), .x2(st_x2), .z(st_z), .state(st_state)
  );

  omc_maj16 u_maj (
    .clk(clk), .rst_n(rst_n), .x1(st_x1), .x2(st_x2), .z(maj_z), .cnt(maj_cnt)
  );

  seq_cease u_seq (
    .clk(clk), .rst_n(rst_n), .x(seq_x), .z(seq_z), .s(seq_s), .omc_state(seq_omc)
  );

  cmm_omc u_cmm (
    .clk(clk), .rst_n(rst_n),
    .a(cmm_a), .b(cmm_b), .c(cmm_c), .d(cmm_d), .x1(cmm_x1), .x2(cmm_x2),
    .z1(cmm_z1), .z2(cmm_z2)
  );

endmodule
