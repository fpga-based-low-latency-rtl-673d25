// sqrt_cordic_fp -- low-latency floating-point square root by hyperbolic
// CORDIC, top level.
//
// The float32 operand is handled as an integer: the exponent field is split
// off and halved at the end, while the mantissa M (or 2M for an odd unbiased
// exponent) goes through 13 hyperbolic vectoring micro-rotations starting
// from x0 = M+1, y0 = M-1, so that x converges to 2*K*sqrt(M). One constant
// multiplication removes the gain K, and the fraction is ORed with the new
// exponent. No division and no rounding step are used; the relative error is
// within about 1.7e-7 over the normalised range.
//
//   sqrt_cordic_init -> cordic_hyp_rotator -> sqrt_scale -> sqrt_pack -> reg
//
// Timing: out_valid/out_y appear LATENCY clock cycles after in_valid/in_x;
// one operand can be accepted every cycle. LATENCY-1 registers sit inside the
// rotation chain and one at the output. The default of 2 cycles is the
// latency reported for the fastest devices at 100 MHz; 3 to 8 match the
// slower devices. Only the valid bits are reset (synchronous, active low).
//
// The arithmetic is bit-exact to the integer algorithm. The sign bit of the
// operand is ignored; zero, denormals, infinity and NaN are not special-cased
// and give the values the integer algorithm gives (for example sqrt(0) gives
// about 7.67e-20 and sqrt(inf) gives 2^64). The valid pipeline with
// throughput one per cycle is this design's choice.
module sqrt_cordic_fp
  import sqrt_cordic_pkg::*;
#(
  parameter int unsigned LATENCY  = 2,
  parameter int unsigned GUARD    = 3,
  parameter int unsigned LAST_J   = 12,
  parameter int unsigned REPEAT_J = 4,
  parameter logic [31:0] SCALE_C  = 32'd40516878
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_x,
  output logic        out_valid,
  output logic [31:0] out_y
);

  localparam int unsigned NROT = n_rot(LAST_J);

  initial begin
    assert (LATENCY >= 1 && LATENCY <= NROT) else $error("LATENCY out of range");
    assert (GUARD <= 5) else $error("GUARD too large for 32-bit arithmetic");
  end

  word_t           i1_0, i2_0, i1_r, frac;
  logic [7:0]      exp_b, exp_r;
  logic            v_r;
  logic [31:0]     y_c;

  sqrt_cordic_init #(.GUARD(GUARD)) u_init (
    .x        (in_x),
    .i1       (i1_0),
    .i2       (i2_0),
    .exp_b    (exp_b),
    .range_hi ()
  );

  cordic_hyp_rotator #(
    .LAST_J   (LAST_J),
    .REPEAT_J (REPEAT_J),
    .NREG     (LATENCY - 1),
    .SIDE_W   (8)
  ) u_rot (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_i1     (i1_0),
    .in_i2     (i2_0),
    .in_side   (exp_b),
    .out_valid (v_r),
    .out_i1    (i1_r),
    .out_i2    (),
    .out_side  (exp_r),
    .out_dirs  ()
  );

  sqrt_scale #(.GUARD(GUARD), .SCALE_C(SCALE_C)) u_scale (
    .i1   (i1_r),
    .frac (frac)
  );

  sqrt_pack u_pack (
    .exp_b (exp_r),
    .frac  (frac),
    .y     (y_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_r;
    out_y <= y_c;
  end

endmodule
