// tb_sqrt_cordic_init -- checks the operand split and the CORDIC start values.
// Expected values are formed from the mantissa M = 1.f: x0 = M+1, y0 = M-1
// for an odd biased exponent, 2M+1 and 2M-1 otherwise, all times 2^(23+3).
module tb_sqrt_cordic_init;
  import sqrt_cordic_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [31:0] x;
  word_t i1, i2;
  logic [7:0] exp_b;
  logic range_hi;

  sqrt_cordic_init dut (.x(x), .i1(i1), .i2(i2), .exp_b(exp_b), .range_hi(range_hi));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] v);
    longint m, ex1, ex2;
    logic hi;
    x = v;
    #1;
    m  = (64'sd1 << 23) + longint'(v[22:0]);
    hi = ~v[23];
    if (hi) m = m * 2;
    ex1 = (m + (64'sd1 << 23)) * 8;
    ex2 = (m - (64'sd1 << 23)) * 8;
    checks++;
    if (longint'(i1) != ex1 || longint'(i2) != ex2 || exp_b != v[30:23] || range_hi != hi) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%h i1=%0d/%0d i2=%0d/%0d e=%h r=%b", v, i1, ex1, i2, ex2, exp_b, range_hi);
    end
  endtask

  initial begin
    check_one(32'h3f80_0000);   // 1.0
    check_one(32'h4000_0000);   // 2.0
    check_one(32'h4080_0000);   // 4.0
    check_one(32'h0000_0000);   // 0.0
    check_one(32'h7f7f_ffff);   // largest normal
    check_one(32'h7f80_0000);   // infinity
    check_one(32'h0080_0000);   // smallest normal
    for (int n = 0; n < 20000; n++) check_one($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
