// Shuffling de-autocorrelator.
//
// A sequential stochastic circuit such as a modulo counter makes successive bits of its
// output depend on each other. Downstream circuits that multiply a bit with an earlier bit
// of the same stream (a squarer, for instance) then compute the wrong value. This block
// breaks the dependence by shuffling: it holds K bits in K flip-flops, and in each cycle an
// externally supplied random index R picks one flip-flop, whose stored bit is sent to the
// output while the incoming bit takes its place. Every bit that enters eventually leaves, so
// the value of the stream is kept; only the positions of its 1s change. A larger K gives a
// more nearly independent output at the cost of more flip-flops and a longer warm-up.
//
// Interface and timing: `q` is the bit stored in flip-flop R before the clock edge, a
// combinational function of `r` and the stored bits; the flip-flop takes `d` at the edge.
// R = k selects flip-flop k; R must be uniformly random for the shuffle to work and comes from
// outside. K must be a power of two. The flip-flops reset to 0 (this design's choice).
module deautocorrelator #(
  parameter int unsigned K  = 2,
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] r,
  input  logic          d,
  output logic          q
);

  logic [K-1:0] buf_q;

  assign q = buf_q[r];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_q <= '0;
    else        buf_q[r] <= d;
  end

  initial assert (K >= 2 && (K & (K - 1)) == 0)
    else $error("deautocorrelator: K must be a power of two, at least 2");

endmodule
