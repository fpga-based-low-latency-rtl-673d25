// sqrt_scale -- gain correction and fraction extraction.
//
// After the rotations i1 holds 2*K*sqrt(M) with 1.0 = 2^(23+GUARD), where
// K ~ 0.82816 is the gain of the hyperbolic schedule. A single signed
// multiplication by SCALE_C = round(4/K * 2^23) = 40516878 followed by an
// arithmetic shift right by 23 gives 8*sqrt(M); shifting right by GUARD+3 more
// leaves sqrt(M) with 23 fraction bits, and subtracting 1.0 (0x800000) leaves
// the 23-bit fraction of the result (sqrt(M) lies in [1,2)).
//
// Purely combinational; on an FPGA the 32x32 product maps to DSP blocks. The
// constant, the shifts and the subtraction follow the algorithm; the result is
// truncated to 32 bits like the int cast of the reference.
module sqrt_scale
  import sqrt_cordic_pkg::*;
#(
  parameter int          GUARD   = 3,
  parameter logic [31:0] SCALE_C = 32'd40516878
) (
  input  word_t i1,
  output word_t frac
);

  logic signed [63:0] prod;
  word_t              scaled;

  always_comb begin
    prod   = 64'(i1) * 64'($signed(SCALE_C));
    scaled = word_t'(prod >>> 23);
    frac   = (scaled >>> (GUARD + 3)) - word_t'(ONE_F);
  end

endmodule
