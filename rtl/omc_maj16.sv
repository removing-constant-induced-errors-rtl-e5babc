// Majority-gate form of the constant-free circuit Z = 11/16 p(00) + 7/16 p(11).
//
// Any constant-free modulo counter can be built around a majority function; this is that
// form of the modulo-16 (11, 0, 7) counter. The counter CNT keeps its state s as a
// thermometer code on 16 lines (the number of 1s on the lines is s; line 15 is never set,
// since s <= 15). The combinational block C turns the inputs X1X2 into 17 lines carrying
// a + 1 ones, where a = 11, 0 or 7 for one-counts 0, 1 and 2 of the inputs: a ones plus one
// line that is always 1. A 33-input majority gate then fires when s + a + 1 >= 17, that is
// exactly when the modulo-16 counter overflows, so the output equals that of the adder-plus-
// counter form. CNT's next state is the thermometer code of (s + a) mod 16.
//
// Interface and timing: one bit of each input per cycle; `z` is combinational from the inputs
// and the current state. Asynchronous active-low reset loads the thermometer code of INIT.
// The line counts (16 and 17) and the three-part structure follow the published figure; the
// extra always-1 line of C is this design's reading, made so that both forms agree exactly.
module omc_maj16 #(
  parameter int unsigned INIT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        x1,
  input  logic        x2,
  output logic        z,
  output logic [15:0] cnt
);

  localparam int unsigned Q = 16;

  logic [16:0] c_lines;     // output lines of C
  logic [5:0]  maj_ones;    // 1s among the 33 majority inputs
  logic [4:0]  s, a, sum;
  logic [15:0] cnt_next;

  // thermometer code with n ones in the low lines
  function automatic logic [16:0] therm17(input logic [4:0] n);
    for (int i = 0; i < 17; i++) therm17[i] = (5'(i) < n);
  endfunction

  function automatic logic [5:0] ones33(input logic [32:0] v);
    ones33 = '0;
    for (int i = 0; i < 33; i++) ones33 = ones33 + 6'(v[i]);
  endfunction

  always_comb begin
    unique case ({x1, x2})
      2'b00:   a = 5'd11;
      2'b11:   a = 5'd7;
      default: a = 5'd0;
    endcase
    c_lines  = therm17(a + 5'd1);
    maj_ones = ones33({c_lines, cnt});
    z        = (maj_ones >= 6'd17);
    // state held by CNT, read back through its output lines
    s        = 5'(ones33({17'b0, cnt}));
    sum      = s + a;
    cnt_next = therm17(z ? sum - 5'(Q) : sum)[15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= therm17(5'(INIT))[15:0];
    else        cnt <= cnt_next;
  end

  initial assert (INIT < Q) else $error("omc_maj16: INIT must be below 16");

endmodule
