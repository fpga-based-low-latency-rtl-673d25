// tb_cordic_hyp_rotator -- checks the rotation chain against the reference
// schedule (1,2,3,4,4,5,...,12) for two pipelinings: NREG = 0 (combinational)
// and NREG = 3. Start values come from random float32 mantissas. Outputs,
// sideband and direction flags are compared bit for bit, the output of the
// pipelined chain must appear exactly 3 cycles after its input, and the final
// x must be close to 2*K*sqrt(M) * 2^26.
module tb_cordic_hyp_rotator;
  import sqrt_cordic_pkg::*;
  import sqrt_ref_pkg::*;

  localparam int NR = 3;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  word_t in_i1 = '0, in_i2 = '0;
  logic [31:0] in_side = '0;

  logic v0, v3;
  word_t c1, c2, p1, p2;
  logic [31:0] cs, ps;
  logic [12:0] cd, pd;

  cordic_hyp_rotator #(.NREG(0), .SIDE_W(32)) u_comb (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_i1(in_i1), .in_i2(in_i2), .in_side(in_side),
    .out_valid(v0), .out_i1(c1), .out_i2(c2), .out_side(cs), .out_dirs(cd));
  cordic_hyp_rotator #(.NREG(NR), .SIDE_W(32)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_i1(in_i1), .in_i2(in_i2), .in_side(in_side),
    .out_valid(v3), .out_i1(p1), .out_i2(p2), .out_side(ps), .out_dirs(pd));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs of the pipelined chain, with the cycle they were sent
  typedef struct { longint x; longint y; logic [31:0] s; logic [12:0] d; int t; real xe; } exp_t;
  exp_t q [$];
  real k_gain;

  function automatic bit close(input longint got, input real want);
    real r;
    r = real'(got) / want - 1.0;
    return (r < 1.0e-5) && (r > -1.0e-5);
  endfunction

  // compare the combinational chain in the same cycle
  always @(negedge clk) begin
    if (rst_n && in_valid) begin
      xy_t a, r;
      logic [63:0] d;
      a.x = longint'(in_i1);
      a.y = longint'(in_i2);
      r = ref_rotate(a, 13, 4);
      d = ref_dirs(a, 13, 4);
      checks++;
      if (longint'(c1) != r.x || longint'(c2) != r.y || cs != in_side || cd != d[12:0] || !v0) begin
        failures++;
        if (failures < 10) $display("FAIL comb: %0d %0d vs %0d %0d", c1, c2, r.x, r.y);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && v3) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = q.pop_front();
        if (longint'(p1) != e.x || longint'(p2) != e.y || ps != e.s || pd != e.d || cycle - e.t != NR
            || !close(longint'(p1), e.xe)) begin
          failures++;
          if (failures < 10) $display("FAIL pipe: %0d %0d vs %0d %0d lat %0d", p1, p2, e.x, e.y, cycle - e.t);
        end
      end
    end
  end

  initial begin
    k_gain = 1.0;
    for (int k = 0; k < 13; k++) k_gain = k_gain * $sqrt(1.0 - 2.0 ** (-2 * ref_shift(k, 4)));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      if ($urandom_range(0, 3) != 0) begin
        logic [31:0] xb;
        xy_t a, r;
        logic [63:0] d;
        exp_t e;
        xb = $urandom();
        a = ref_init(xb, 3);
        r = ref_rotate(a, 13, 4);
        d = ref_dirs(a, 13, 4);
        in_valid <= 1'b1;
        in_i1 <= word_t'(a.x);
        in_i2 <= word_t'(a.y);
        in_side <= xb;
        e.x = r.x; e.y = r.y; e.s = xb; e.d = d[12:0]; e.t = cycle + 1;
        e.xe = k_gain * $sqrt(real'(a.x) * real'(a.x) - real'(a.y) * real'(a.y));
        q.push_back(e);
      end else begin
        in_valid <= 1'b0;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (NR + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
