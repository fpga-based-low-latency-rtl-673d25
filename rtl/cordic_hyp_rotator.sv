// cordic_hyp_rotator -- the chain of hyperbolic micro-rotations.
//
// Rotation k (k = 0 .. LAST_J) shifts by 1, 2, ..., REPEAT_J, REPEAT_J,
// REPEAT_J+1, ..., LAST_J: the schedule 1..LAST_J with REPEAT_J executed twice,
// 13 rotations for the defaults (1..12, 4 repeated). The first rotation always
// subtracts; the others choose their direction from the sign of i2.
//
// NREG pipeline registers are spread over the chain, cutting it into NREG+1
// segments of about equal length (NREG = 0 gives a combinational chain). A
// valid bit, a sideband word (the exponent) and the direction flags travel
// with the data, so out_* appear NREG cycles after in_*. Registers update every
// cycle (no back-pressure); only the valid bits are reset (synchronous,
// active low).
//
// The schedule and the unconditional first rotation follow the algorithm; the
// register placement and the valid/sideband signals are this design's own.
module cordic_hyp_rotator
  import sqrt_cordic_pkg::*;
#(
  parameter int unsigned LAST_J   = 12,
  parameter int unsigned REPEAT_J = 4,
  parameter int unsigned NREG     = 1,
  parameter int unsigned SIDE_W   = 8,
  localparam int unsigned NROT    = n_rot(LAST_J)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  word_t             in_i1,
  input  word_t             in_i2,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  output word_t             out_i1,
  output word_t             out_i2,
  output logic [SIDE_W-1:0] out_side,
  output logic [NROT-1:0]   out_dirs
);

  initial begin
    assert (REPEAT_J >= 1 && REPEAT_J <= LAST_J) else $error("REPEAT_J out of range");
    assert (NREG < NROT) else $error("NREG must be below the number of rotations");
  end

  for (genvar k = 0; k < NROT; k++) begin : g_rot
    // stage inputs: the module inputs for the first rotation, else the
    // outputs of the previous stage
    logic              iv, ov;
    word_t             ia1, ia2, oa1, oa2, n1, n2;
    logic [SIDE_W-1:0] isd, osd;
    logic [NROT-1:0]   idr, odr, nd;
    logic              sub;

    if (k == 0) begin : g_first
      assign iv  = in_valid;
      assign ia1 = in_i1;
      assign ia2 = in_i2;
      assign isd = in_side;
      assign idr = '0;
    end else begin : g_next
      assign iv  = g_rot[k-1].ov;
      assign ia1 = g_rot[k-1].oa1;
      assign ia2 = g_rot[k-1].oa2;
      assign isd = g_rot[k-1].osd;
      assign idr = g_rot[k-1].odr;
    end

    cordic_hyp_step #(
      .SHIFT     (rot_shift(k, REPEAT_J)),
      .FORCE_SUB (k == 0)
    ) u_step (
      .i1_in  (ia1),
      .i2_in  (ia2),
      .i1_out (n1),
      .i2_out (n2),
      .sub    (sub)
    );

    always_comb begin
      nd    = idr;
      nd[k] = sub;
    end

    if (reg_after(k, NROT, NREG)) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) ov <= 1'b0;
        else        ov <= iv;
        oa1 <= n1;
        oa2 <= n2;
        osd <= isd;
        odr <= nd;
      end
    end else begin : g_wire
      assign ov  = iv;
      assign oa1 = n1;
      assign oa2 = n2;
      assign osd = isd;
      assign odr = nd;
    end
  end

  assign out_valid = g_rot[NROT-1].ov;
  assign out_i1    = g_rot[NROT-1].oa1;
  assign out_i2    = g_rot[NROT-1].oa2;
  assign out_side  = g_rot[NROT-1].osd;
  assign out_dirs  = g_rot[NROT-1].odr;

endmodule
