// sqrt_ref_pkg -- reference model for the testbenches of the CORDIC square root.
//
// An independent, loop-based model of the integer algorithm in 64-bit
// arithmetic: the mantissa M = 1.f (or 2M for an odd unbiased exponent) is
// formed from the fields, x0 = M+1 and y0 = M-1 are scaled by 2^(23+guard),
// the hyperbolic vectoring schedule 1,2,3,4,4,5,...,12 is applied, the gain is
// removed with the constant 40516878 / 2^23 and the exponent is halved.
// Helpers convert float32 and float64 bit patterns to real values so that
// results can also be compared with the exact square root.
package sqrt_ref_pkg;

  localparam longint ONE = 64'sd1 << 23;

  typedef struct {
    longint x;
    longint y;
  } xy_t;

  // Start values for a float32 operand.
  function automatic xy_t ref_init(input logic [31:0] xb, input int guard);
    longint m;
    xy_t r;
    m = ONE + longint'(xb[22:0]);
    if (xb[23] == 1'b0) m = 2 * m;          // even biased exponent: use 2M
    r.x = (m + ONE) * (64'sd1 << guard);
    r.y = (m - ONE) * (64'sd1 << guard);
    return r;
  endfunction

  // Shift of rotation number k for the schedule 1..last_j, rep_j twice.
  function automatic int ref_shift(input int k, input int rep_j);
    if (k < rep_j) return k + 1;
    return k;
  endfunction

  // Rotation number k applied to (x, y).
  function automatic xy_t ref_step(input xy_t a, input int k, input int rep_j);
    xy_t r;
    longint dx, dy;
    int s;
    s  = ref_shift(k, rep_j);
    dx = a.y >>> s;
    dy = a.x >>> s;
    if (k == 0 || a.y >= 0) begin
      r.x = a.x - dx;
      r.y = a.y - dy;
    end else begin
      r.x = a.x + dx;
      r.y = a.y + dy;
    end
    return r;
  endfunction

  // Apply rotations 0 .. n-1 of the schedule to (x, y).
  function automatic xy_t ref_rotate(input xy_t a, input int n, input int rep_j);
    xy_t r = a;
    for (int k = 0; k < n; k++) r = ref_step(r, k, rep_j);
    return r;
  endfunction

  // Direction flags (1 = subtract) of rotations 0 .. n-1.
  function automatic logic [63:0] ref_dirs(input xy_t a, input int n, input int rep_j);
    logic [63:0] d = '0;
    xy_t r = a;
    for (int k = 0; k < n; k++) begin
      d[k] = (k == 0 || r.y >= 0);
      r = ref_step(r, k, rep_j);
    end
    return d;
  endfunction

  // Gain removal and fraction extraction.
  function automatic longint ref_scale(input longint x, input int guard);
    longint p;
    p = (x * 64'sd40516878) >>> 23;
    p = longint'(int'(p));                  // keep 32 bits, as the hardware does
    return (p >>> (guard + 3)) - ONE;
  endfunction

  // Result exponent field: floor((E + 127) / 2).
  function automatic logic [7:0] ref_exp(input logic [7:0] e);
    return 8'((int'(e) + 127) / 2);
  endfunction

  // Complete model of the unit.
  function automatic logic [31:0] ref_sqrt(input logic [31:0] xb);
    xy_t a;
    longint f;
    a = ref_rotate(ref_init(xb, 3), 13, 4);
    f = ref_scale(a.x, 3);
    return {1'b0, ref_exp(xb[30:23]), 23'd0} | 32'(f);
  endfunction

  // float32 bit pattern to real (normal numbers and zero; inf maps to 2^128).
  function automatic real f2r(input logic [31:0] b);
    logic [63:0] d;
    if (b[30:0] == 0) return 0.0;
    d = {b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Number of rotations in the default schedule that added (sigma = -1).
  function automatic int ref_adds(input logic [31:0] xb);
    logic [63:0] d;
    d = ref_dirs(ref_init(xb, 3), 13, 4);
    return 13 - $countones(d[12:0]);
  endfunction

endpackage
