// sqrt_cordic_init -- operand split and CORDIC start values.
//
// The float32 operand is treated as a plain integer. Masking gives the biased
// exponent, i_m (23 fraction bits plus the exponent LSB as bit 23) and i_m0
// (the 23 fraction bits). Bit 23 of i_m selects the mantissa range: when it is
// set (biased exponent odd, unbiased exponent even) the mantissa M = 1.f is
// used as is, otherwise 2M in [2,4) is used so that the exponent becomes even.
// The start values of hyperbolic vectoring are x0 = M+1 and y0 = M-1 (or 2M+1
// and 2M-1), with 1.0 = 2^23, then shifted left by GUARD extra bits.
//
// Purely combinational. Interface: x in, i1/i2 (x0/y0, signed) out, the
// biased exponent field and the range flag out.
//
// The masks, the constants 8388608 and 25165824 and the three guard bits are
// those of the algorithm; the sign bit is ignored (operands are taken as
// non-negative), which is this design's choice.
module sqrt_cordic_init
  import sqrt_cordic_pkg::*;
#(
  parameter int unsigned GUARD = 3
) (
  input  logic [31:0] x,
  output word_t       i1,
  output word_t       i2,
  output logic [7:0]  exp_b,
  output logic        range_hi
);

  logic [31:0] i_m, i_m0;

  always_comb begin
    i_m      = x & IM_MASK;
    i_m0     = x & IM0_MASK;
    exp_b    = x[30:23];       // (x & 0x7f800000) >> 23
    range_hi = (i_m < ONE_F);
    if (!range_hi) begin
      i1 = word_t'((i_m + ONE_F) << GUARD);
      i2 = word_t'(i_m0 << GUARD);
    end else begin
      i1 = word_t'(((i_m << 1) + THREE_F) << GUARD);
      i2 = word_t'(((i_m << 1) + ONE_F) << GUARD);
    end
  end

endmodule
