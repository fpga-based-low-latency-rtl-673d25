// sqrt_pack -- result exponent and repacking.
//
// The result exponent is half the unbiased operand exponent, rounded down:
// with the biased field E this is floor((E + 127) / 2), computed on the field
// in place as ((i_exp + 0x3f800000) >> 1) & 0x7f800000. The fraction from the
// scaler is ORed in to form the float32 result (sign 0).
//
// Purely combinational. The formula follows the algorithm, including its OR
// of the whole 32-bit fraction word (which only ever has bits 22:0 set over
// the operand range).
module sqrt_pack
  import sqrt_cordic_pkg::*;
(
  input  logic [7:0]  exp_b,
  input  word_t       frac,
  output logic [31:0] y
);

  logic [31:0] i_exp, e_sum;

  always_comb begin
    i_exp = {1'b0, exp_b, 23'd0};
    e_sum = (i_exp + EXP_BIAS_HI) >> 1;
    y     = (e_sum & EXP_MASK) | 32'(frac);
  end

endmodule
