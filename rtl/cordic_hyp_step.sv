// cordic_hyp_step -- one hyperbolic CORDIC micro-rotation in vectoring mode.
//
// With di1 = i2 >>> SHIFT and di2 = i1 >>> SHIFT (arithmetic shifts), the step
// computes i1 - di1, i2 - di2 when i2 >= 0 and i1 + di1, i2 + di2 otherwise,
// which drives i2 (y) towards zero while i1 (x) converges to
// K * sqrt(x0^2 - y0^2). With FORCE_SUB set the step always subtracts, as the
// first rotation of the algorithm does (its y0 is never negative).
//
// Purely combinational. The output sub reports the direction taken
// (1 = subtract), for observation only. Wrap-around 32-bit arithmetic, as in
// the int32_t reference; the operand range keeps every value far from
// overflow.
module cordic_hyp_step
  import sqrt_cordic_pkg::*;
#(
  parameter int unsigned SHIFT     = 1,
  parameter bit          FORCE_SUB = 1'b0
) (
  input  word_t i1_in,
  input  word_t i2_in,
  output word_t i1_out,
  output word_t i2_out,
  output logic  sub
);

  word_t di1, di2;

  always_comb begin
    di1 = i2_in >>> SHIFT;
    di2 = i1_in >>> SHIFT;
    sub = FORCE_SUB || (i2_in >= 0);
    if (sub) begin
      i1_out = i1_in - di1;
      i2_out = i2_in - di2;
    end else begin
      i1_out = i1_in + di1;
      i2_out = i2_in + di2;
    end
  end

endmodule
