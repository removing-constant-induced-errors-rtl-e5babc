// Constant-free stochastic complex matrix-vector multiplier.
//
// Computes Z1 = (A X1 + B X2) / 4 and Z2 = (C X1 + D X2) / 4 on complex bipolar SNs (value
// 2p - 1 for each of the real and imaginary streams). Each real output is a scaled sum of
// four products, for example Re Z1 = (Ar X1r - Ai X1i + Br X2r - Bi X2i) / 4. A bipolar
// product is an XNOR of the two bits and a negation is an inverter. The combinational
// version picks one of the four product bits per cycle with a tree of multiplexers driven by
// three random constants of value 1/2. Here each output instead feeds the number of 1s among
// its four product bits to a modulo-4 counter (four states, two flip-flops) whose overflow is
// the output bit, so the scaled sum is accumulated exactly.
//
// Interface and timing: one bit of every input stream per cycle; outputs are combinational
// from the inputs and the counters' current states. Asynchronous active-low reset loads INIT
// into all four counters. The four-state counters follow the published result; the
// assignment of products to outputs is the usual complex product and is this design's
// reading of the original circuit.
module cmm_omc
  import sc_pkg::*;
#(
  parameter int unsigned INIT = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cbit_t a,
  input  cbit_t b,
  input  cbit_t c,
  input  cbit_t d,
  input  cbit_t x1,
  input  cbit_t x2,
  output cbit_t z1,
  output cbit_t z2
);

  localparam int unsigned Q = 4;  // four product terms, each weighted 1/4

  // four product bits of each output: re(z1), im(z1), re(z2), im(z2)
  logic [3:0] prod [4];
  logic [2:0] ones [4];
  logic [1:0] st   [4];
  logic [3:0] zb;

  // bipolar multiply
  function automatic logic bmul(input logic p, input logic q);
    return ~(p ^ q);
  endfunction

  always_comb begin
    prod[0] = {bmul(a.re, x1.re), ~bmul(a.im, x1.im), bmul(b.re, x2.re), ~bmul(b.im, x2.im)};
    prod[1] = {bmul(a.re, x1.im),  bmul(a.im, x1.re), bmul(b.re, x2.im),  bmul(b.im, x2.re)};
    prod[2] = {bmul(c.re, x1.re), ~bmul(c.im, x1.im), bmul(d.re, x2.re), ~bmul(d.im, x2.im)};
    prod[3] = {bmul(c.re, x1.im),  bmul(c.im, x1.re), bmul(d.re, x2.im),  bmul(d.im, x2.re)};
    for (int k = 0; k < 4; k++)
      ones[k] = 3'(prod[k][0]) + 3'(prod[k][1]) + 3'(prod[k][2]) + 3'(prod[k][3]);
  end

  for (genvar k = 0; k < 4; k++) begin : g_out
    omc_counter #(
      .Q   (Q),
      .INIT(INIT)
    ) u_omc (
      .clk  (clk),
      .rst_n(rst_n),
      .inc  (ones[k]),   // jump = number of 1s among the products
      .z    (zb[k]),
      .state(st[k])
    );
  end

  assign z1 = '{re: zb[0], im: zb[1]};
  assign z2 = '{re: zb[2], im: zb[3]};

endmodule
