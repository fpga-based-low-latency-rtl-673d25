// tb_cordic_hyp_step -- checks single micro-rotations for several shifts and
// for the forced-subtract first rotation, against
// x' = x - s*(y >> j), y' = y - s*(x >> j), s = +1 when y >= 0, else -1.
module tb_cordic_hyp_step;
  import sqrt_cordic_pkg::*;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;
  logic clk = 1'b0;
  word_t a1, a2;
  word_t o1 [4], o2 [4];
  logic  sb [4];

  cordic_hyp_step #(.SHIFT(1),  .FORCE_SUB(1'b1)) u0 (.i1_in(a1), .i2_in(a2), .i1_out(o1[0]), .i2_out(o2[0]), .sub(sb[0]));
  cordic_hyp_step #(.SHIFT(2),  .FORCE_SUB(1'b0)) u1 (.i1_in(a1), .i2_in(a2), .i1_out(o1[1]), .i2_out(o2[1]), .sub(sb[1]));
  cordic_hyp_step #(.SHIFT(4),  .FORCE_SUB(1'b0)) u2 (.i1_in(a1), .i2_in(a2), .i1_out(o1[2]), .i2_out(o2[2]), .sub(sb[2]));
  cordic_hyp_step #(.SHIFT(12), .FORCE_SUB(1'b0)) u3 (.i1_in(a1), .i2_in(a2), .i1_out(o1[3]), .i2_out(o2[3]), .sub(sb[3]));

  localparam int SH [4] = '{1, 2, 4, 12};
  localparam bit FS [4] = '{1'b1, 1'b0, 1'b0, 1'b0};

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      // operands of the size the square root produces: |x|, |y| < 2^29
      a1 = word_t'($urandom_range(0, 32'h1fff_ffff));
      a2 = word_t'(int'($urandom_range(0, 32'h3fff_ffff)) - int'(32'h2000_0000));
      if (n == 0) a2 = 0;
      #1;
      for (int u = 0; u < 4; u++) begin
        longint d1, d2, e1, e2;
        bit s;
        d1 = longint'(a2) >>> SH[u];
        d2 = longint'(a1) >>> SH[u];
        s  = FS[u] || (a2 >= 0);
        e1 = s ? longint'(a1) - d1 : longint'(a1) + d1;
        e2 = s ? longint'(a2) - d2 : longint'(a2) + d2;
        if (s) n_sub++; else n_add++;
        checks++;
        if (longint'(o1[u]) != e1 || longint'(o2[u]) != e2 || sb[u] != s) begin
          failures++;
          if (failures < 10) $display("FAIL u=%0d a=%0d,%0d got %0d,%0d exp %0d,%0d", u, a1, a2, o1[u], o2[u], e1, e2);
        end
      end
    end
    checks++;
    if (n_add == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL: both directions not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
