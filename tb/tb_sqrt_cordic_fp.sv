// tb_sqrt_cordic_fp -- end-to-end test of the floating-point square root at
// its default parameters (2-cycle latency).
//
// A stream of float32 operands (random normal numbers, values at the mantissa
// range boundaries and the four special operands 0, 1.1754942e-38, largest
// normal and infinity) is fed with random idle cycles and runs of back-to-back
// operands. Every result is checked
//   - bit for bit against an independent integer model,
//   - against the exact square root: relative error within
//     [-1.7001956e-7, 1.0053241e-7], the extremes reported for the algorithm,
//   - for its latency of exactly 2 cycles,
// and the four special operands against their reported results. A reset in
// the middle of a stream must drop the operands in flight. Each mechanism
// (both mantissa ranges, rotations that add, back-to-back operands, idle
// cycles, the reset flush, the special operands) is counted and must occur.
module tb_sqrt_cordic_fp;
  import sqrt_ref_pkg::*;

  localparam int LAT = 2;
  localparam int N_OPS = 200000;

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
    repeat (4 * N_OPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] x; int t; real want; } item_t;
  item_t q [$];

  // mechanism counters
  int n_range_lo = 0, n_range_hi = 0, n_add_rot = 0, n_b2b = 0, n_idle = 0;
  int n_flush = 0, n_special = 0, n_results = 0;
  real dr_min = 0.0, dr_max = 0.0;
  logic prev_valid = 1'b0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      logic [31:0] e;
      checks++;
      n_results++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result without operand");
      end else begin
        it = q.pop_front();
        e = ref_sqrt(it.x);
        if (out_y !== e || cycle - it.t != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h y=%h exp=%h latency=%0d", it.x, out_y, e, cycle - it.t);
        end
        if (it.want != 0.0) begin
          // special operand: compare with the reported value
          real r;
          r = f2r(out_y) / it.want - 1.0;
          checks++;
          n_special++;
          if (r > 1.0e-15 || r < -1.0e-15) begin
            failures++;
            $display("FAIL special x=%h y=%h (%e, want %e)", it.x, out_y, f2r(out_y), it.want);
          end
        end else begin
          real dr;
          dr = f2r(out_y) / $sqrt(f2r(it.x)) - 1.0;
          if (dr < dr_min) dr_min = dr;
          if (dr > dr_max) dr_max = dr;
          checks++;
          if (dr < -1.7001956e-7 - 5.0e-15 || dr > 1.0053241e-7 + 5.0e-15) begin
            failures++;
            if (failures < 10) $display("FAIL accuracy x=%h y=%h dr=%e", it.x, out_y, dr);
          end
        end
      end
    end
  end

  task automatic send(input logic [31:0] xb, input real want);
    item_t it;
    @(posedge clk);
    if (prev_valid) n_b2b++;
    prev_valid = 1'b1;
    in_valid <= 1'b1;
    in_x <= xb;
    it.x = xb; it.t = cycle + 1; it.want = want;
    q.push_back(it);
    if (xb[23]) n_range_lo++; else n_range_hi++;
    n_add_rot += ref_adds(xb);
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(posedge clk);
      in_valid <= 1'b0;
      prev_valid = 1'b0;
      n_idle++;
    end
  endtask

  function automatic logic [31:0] rnd_normal();
    return {1'b0, 8'($urandom_range(1, 254)), 23'($urandom())};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    idle(2);

    // special operands and their reported results
    send(32'h0000_0000, 7.6664669522108749e-20);   // zero
    send(32'h007f_ffff, 1.0842021078620191e-19);   // 1.1754942e-38, largest subnormal
    send(32'h7f7f_ffff, 1.8446742974197924e+19);   // largest normal
    send(32'h7f80_0000, 1.8446744073709552e+19);   // infinity
    idle(1);

    // mantissa range boundaries
    send(32'h3f80_0000, 0.0);  // 1.0
    send(32'h4000_0000, 0.0);  // 2.0
    send(32'h4080_0000, 0.0);  // 4.0
    send(32'h3fff_ffff, 0.0);  // just below 2
    send(32'h407f_ffff, 0.0);  // just below 4
    send(32'h3f80_0001, 0.0);
    send(32'h4000_0001, 0.0);
    idle(3);

    // reset while operands are in flight: they must be dropped
    send(rnd_normal(), 0.0);
    send(rnd_normal(), 0.0);
    @(posedge clk);
    in_valid <= 1'b0;
    prev_valid = 1'b0;
    rst_n <= 1'b0;
    q.delete();
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL: output after reset");
    end else begin
      n_flush++;
    end

    // random stream
    for (int n = 0; n < N_OPS; n++) begin
      send(rnd_normal(), 0.0);
      if ($urandom_range(0, 7) == 0) idle($urandom_range(1, 3));
    end
    idle(LAT + 3);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("results=%0d range[1,2)=%0d range[2,4)=%0d add-rotations=%0d back-to-back=%0d idle=%0d flush=%0d special=%0d",
             n_results, n_range_lo, n_range_hi, n_add_rot, n_b2b, n_idle, n_flush, n_special);
    $display("relative error min=%e max=%e", dr_min, dr_max);
    checks++;
    if (n_range_lo == 0 || n_range_hi == 0 || n_add_rot == 0 || n_b2b == 0 || n_idle == 0
        || n_flush == 0 || n_special != 4) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
