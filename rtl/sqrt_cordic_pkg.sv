// sqrt_cordic_pkg -- constants, types and helper functions shared by the
// floating-point CORDIC square-root unit.
//
// The unit works on IEEE-754 single-precision bit patterns with 32-bit signed
// integer arithmetic throughout, exactly as a software integer routine would.
// The constants below (field masks, the value 1.0 of the fraction, the gain
// correction constant) come from the algorithm; the iteration schedule is
// the classical hyperbolic one, shifts 1..LAST_J with shift REPEAT_J taken
// twice so that the iteration converges.
package sqrt_cordic_pkg;

  localparam int unsigned W = 32;                       // datapath width (int32_t)
  typedef logic signed [W-1:0] word_t;

  localparam logic [31:0] EXP_MASK  = 32'h7f80_0000;    // biased exponent field
  localparam logic [31:0] IM_MASK   = 32'h00ff_ffff;    // fraction + exponent LSB
  localparam logic [31:0] IM0_MASK  = 32'h007f_ffff;    // fraction only
  localparam logic [31:0] ONE_F     = 32'h0080_0000;    // 1.0 with 23 fraction bits (8388608)
  localparam logic [31:0] THREE_F   = 32'h0180_0000;    // 3.0 with 23 fraction bits (25165824)
  localparam logic [31:0] EXP_BIAS_HI = 32'h3f80_0000;  // bias 127 in the exponent field

  // Number of micro-rotations for a schedule 1..last_j with repeat_j done twice.
  function automatic int unsigned n_rot(input int unsigned last_j);
    return last_j + 1;
  endfunction

  // Shift amount of rotation number k (k = 0 is the first rotation).
  function automatic int unsigned rot_shift(input int unsigned k, input int unsigned repeat_j);
    return (k < repeat_j) ? k + 1 : k;
  endfunction

  // True when a pipeline register follows rotation k, for a chain of nrot
  // rotations cut into (nreg + 1) roughly equal segments; the last segment
  // (after the final rotation) is closed by the register of the caller.
  function automatic bit reg_after(input int unsigned k, input int unsigned nrot,
                                   input int unsigned nreg);
    bit hit = 1'b0;
    for (int unsigned s = 1; s <= nreg; s++) begin
      if (k + 1 == (s * nrot + (nreg + 1) / 2) / (nreg + 1)) hit = 1'b1;
    end
    return hit;
  endfunction

endpackage
