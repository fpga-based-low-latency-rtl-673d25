// tb_sqrt_pack -- checks the exponent halving floor((E+127)/2) for every
// biased exponent and the merging of the fraction.
module tb_sqrt_pack;
  import sqrt_cordic_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [7:0] e;
  word_t frac;
  logic [31:0] y;

  sqrt_pack dut (.exp_b(e), .frac(frac), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ee = 0; ee < 256; ee++) begin
      for (int n = 0; n < 20; n++) begin
        int unbiased, half;
        logic [31:0 ] ex;
        e = 8'(ee);
        frac = word_t'($urandom_range(0, 32'h007f_ffff));
        #1;
        // result exponent: floor of half the unbiased exponent, rebiased
        unbiased = ee - 127;
        half = (unbiased >= 0) ? unbiased / 2 : -((-unbiased + 1) / 2);
        ex = {1'b0, 8'(half + 127), frac[22:0]};
        checks++;
        if (y !== ex) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d frac=%h y=%h exp=%h", ee, frac, y, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
