// lift_pu: generic predict/update (P/U) module of the flipped lifting scheme.
//
//   y = K * self + (a + b) >>> SH
//
// One P/U module realises one line of the flipped Daubechies (9,7) equations: P1 uses
// K = A, SH = 0; U1 uses K = B, SH = 4 (division by 16); P2 uses K = C, SH = 1; U2 uses
// K = D, SH = 1. The constant product comes from a shift-and-add multiplier; the neighbour
// sum is formed in the same clock, and the final addition in the next, so that each
// register-to-register path holds the product tree or a single adder.
//
// Timing: two clocks of latency, fully pipelined (one operation per clock). The module has
// no enable: a caller tracks which results are valid. The equation and the use of a shift
// for the scaled neighbour sum follow the published flipping scheme; the two-stage split
// is this design's choice.
module lift_pu
  import dwt_pkg::*;
#(
  parameter logic signed [KW-1:0] K  = K_A,
  parameter int unsigned          SH = 0
) (
  input  logic  clk,
  input  coef_t self_i,  // the sample being lifted
  input  coef_t a_i,     // left neighbour from the other polyphase stream
  input  coef_t b_i,     // right neighbour from the other polyphase stream
  output coef_t y_o
);

  coef_t                prod;
  logic signed [W:0]    nsum_q;

  const_mult #(.K(K)) u_mult (.clk(clk), .x(self_i), .y(prod));

  always_ff @(posedge clk) nsum_q <= (W+1)'(a_i) + (W+1)'(b_i);

  always_ff @(posedge clk) y_o <= coef_t'((W+1)'(prod) + (nsum_q >>> SH));

endmodule
