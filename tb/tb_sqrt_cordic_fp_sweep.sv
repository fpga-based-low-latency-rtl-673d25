// tb_sqrt_cordic_fp_sweep -- exhaustive accuracy sweep.
//
// For a normal operand the datapath only sees the 23 fraction bits and the
// parity of the exponent; the exponent itself is just halved. Feeding every
// fraction with one odd and one even exponent (2 * 2^23 operands, back to
// back) therefore covers the result of every normal float32 operand. Each
// result is compared with the exact square root; the relative error must lie
// within [-1.7001956e-7, 1.0053241e-7], the extremes reported for the
// algorithm (to their 8 printed digits), and the extremes found must be those
// values. Latency is checked too.
module tb_sqrt_cordic_fp_sweep;
  import sqrt_ref_pkg::*;

  localparam int LAT = 2;
  localparam int N_FRAC = 1 << 23;
  // reported error extremes, printed to 8 significant digits
  localparam real LO  = -1.7001956e-7;
  localparam real HI  = 1.0053241e-7;
  localparam real TOL = 5.0e-15;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [31:0] in_x = '0;
  logic out_valid;
  logic [31:0] out_y;

  sqrt_cordic_fp dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x),
    .out_valid(out_valid), .out_y(out_y));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2 * N_FRAC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operands sent, by cycle (the stream has no gaps)
  logic [31:0] sent_x [$];
  int          sent_t [$];
  real dr_min = 0.0, dr_max = 0.0;
  logic [31:0] x_min, x_max;
  int n_res = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] x;
      int t;
      real dr;
      x = sent_x.pop_front();
      t = sent_t.pop_front();
      dr = f2r(out_y) / $sqrt(f2r(x)) - 1.0;
      if (dr < dr_min) begin dr_min = dr; x_min = x; end
      if (dr > dr_max) begin dr_max = dr; x_max = x; end
      n_res++;
      checks++;
      if (dr < LO - TOL || dr > HI + TOL || cycle - t != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h dr=%e latency=%0d", x, out_y, dr, cycle - t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int e = 127; e <= 128; e++) begin
      for (int f = 0; f < N_FRAC; f++) begin
        logic [31:0] x;
        @(posedge clk);
        x = {1'b0, 8'(e), 23'(f)};
        in_valid <= 1'b1;
        in_x <= x;
        sent_x.push_back(x);
        sent_t.push_back(cycle + 1);
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (n_res != 2 * N_FRAC) begin
      failures++;
      $display("FAIL: %0d results for %0d operands", n_res, 2 * N_FRAC);
    end
    $display("relative error min=%.10e (x=%h) max=%.10e (x=%h)", dr_min, x_min, dr_max, x_max);
    // the sweep covers every normal operand, so its extremes must be the
    // reported ones
    checks++;
    if (dr_min < LO - TOL || dr_min > LO + TOL || dr_max < HI - TOL || dr_max > HI + TOL) begin
      failures++;
      $display("FAIL: error extremes differ from the reported ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
