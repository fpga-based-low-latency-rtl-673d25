// tb_sqrt_scale -- checks the gain correction. The constant is first derived
// from the gain K = prod sqrt(1 - 2^-2j) of the schedule 1..12 with 4 twice
// (round(4/K * 2^23) must be 40516878); then converged x values
// 2*K*sqrt(m) * 2^26 are fed and the fraction is compared with the integer
// formula and with sqrt(m) itself.
module tb_sqrt_scale;
  import sqrt_cordic_pkg::*;
  import sqrt_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  word_t i1, frac;
  real k_gain;

  sqrt_scale dut (.i1(i1), .frac(frac));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k_gain = 1.0;
    for (int k = 0; k < 13; k++) k_gain = k_gain * $sqrt(1.0 - 2.0 ** (-2 * ref_shift(k, 4)));
    checks++;
    if (longint'(4.0 / k_gain * 2.0 ** 23 + 0.5) != 40516878) begin
      failures++;
      $display("FAIL: gain constant %f", 4.0 / k_gain * 2.0 ** 23);
    end
    for (int n = 0; n < 20000; n++) begin
      real m, xr, got;
      longint e;
      m  = 1.0 + 3.0 * real'($urandom_range(0, 1 << 24)) / real'(1 << 24);   // [1, 4]
      xr = 2.0 * k_gain * $sqrt(m) * 2.0 ** 26;
      i1 = word_t'(longint'(xr));
      #1;
      e = ref_scale(longint'(i1), 3);
      got = 1.0 + real'(frac) / 2.0 ** 23;
      checks++;
      if (longint'(frac) != e || got / $sqrt(m) - 1.0 > 1.0e-6 || got / $sqrt(m) - 1.0 < -1.0e-6) begin
        failures++;
        if (failures < 10) $display("FAIL i1=%0d frac=%0d exp=%0d m=%f", i1, frac, e, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
