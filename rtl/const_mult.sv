// const_mult: multiply a data word by a fixed lifting constant using shifts and adds.
//
// The constant is a parameter, so the product is built as the sum of the input shifted by
// the position of each set bit of |K| (negated for a negative K); no multiplier cell is
// inferred by construction. The full product is registered once and then scaled back by
// the constant's 11 fractional bits with an arithmetic shift, which truncates towards
// minus infinity, and wrapped to the 17-bit word.
//
// Timing: one clock of latency, a new operand every clock. Using shift-and-add constant
// multipliers and pipelining them follows the published design; the single register
// stage is this design's choice.
module const_mult
  import dwt_pkg::*;
#(
  parameter logic signed [KW-1:0] K = K_A
) (
  input  logic  clk,
  input  coef_t x,
  output coef_t y
);

  localparam int unsigned PW = W + KW;
  localparam logic [KW-1:0] KMAG = (K < 0) ? KW'(-K) : KW'(K);

  logic signed [PW-1:0] sum_c;
  logic signed [PW-1:0] prod_q;

  always_comb begin
    logic signed [PW-1:0] acc;
    acc = '0;
    for (int unsigned b = 0; b < KW; b++) begin
      if (KMAG[b]) acc = acc + (PW'(x) <<< b);
    end
    sum_c = (K < 0) ? -acc : acc;
  end

  always_ff @(posedge clk) prod_q <= sum_c;

  assign y = coef_t'(prod_q >>> KFRAC);

endmodule
