// Constant-free realisation of Z = 11/16 p(X1X2 = 00) + 7/16 p(X1X2 = 11).
//
// In the inverted-bipolar format (value = 1 - 2p) this is the polynomial
// 7/16 - (X1 + X2)/8 - 9/16 X1 X2 for two independent inputs of the same value. A
// combinational realisation needs four random constants of value 1/2; here they are removed.
// A two-input adder counts the 1s among X1 and X2 (0, 1 or 2) and a modulo-16 counter adds
// 11, 0 or 7 to its state accordingly. The counter's overflow is the output SN. Four
// flip-flops hold the state.
//
// Interface and timing: one bit of each input per cycle; `z` is combinational from the inputs
// and the current state `state`. Asynchronous active-low reset loads INIT (0 truncates, 8 rounds to
// nearest). The adder, the modulo-16 counter and its increments follow the published design.
module omc_strauss16 #(
  parameter int unsigned INIT = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x1,
  input  logic x2,
  output logic       z,
  output logic [3:0] state
);

  logic [1:0] ones;     // adder: number of 1s among the two inputs
  logic [4:0] jump;

  always_comb begin
    ones = 2'(x1) + 2'(x2);
    unique case (ones)
      2'd0:    jump = 5'd11;
      2'd2:    jump = 5'd7;
      default: jump = 5'd0;
    endcase
  end

  omc_counter #(
    .Q   (16),
    .INIT(INIT)
  ) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .inc  (jump),
    .z    (z),
    .state(state)
  );

endmodule
