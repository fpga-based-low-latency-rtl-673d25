// tb_sqrt_cordic_fp_latency -- runs the unit in each pipelining reported for
// the FPGA families at 100 MHz: 2 cycles (Kintex/Virtex UltraScale+, Versal),
// 3 (Zynq UltraScale+), 4 (Kintex-7 Ultra), 5 (Kintex-7, Virtex-7),
// 7 (Artix-7, Zynq-7000) and 8 (Spartan-7). All six instances get the same
// operand stream; each result must equal the integer model and appear exactly
// LATENCY cycles after its operand.
module tb_sqrt_cordic_fp_latency;
  import sqrt_ref_pkg::*;

  localparam int NI = 6;
  localparam int LATS [NI] = '{2, 3, 4, 5, 7, 8};
  localparam int N_OPS = 20000;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [31:0] in_x = '0;
  logic        ov [NI];
  logic [31:0] oy [NI];

  for (genvar g = 0; g < NI; g++) begin : g_dut
    sqrt_cordic_fp #(.LATENCY(LATS[g])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x),
      .out_valid(ov[g]), .out_y(oy[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (4 * N_OPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] x; int t; } item_t;
  item_t q [NI][$];
  int n_out [NI];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < NI; g++) begin
        if (ov[g]) begin
          item_t it;
          checks++;
          n_out[g]++;
          if (q[g].size() == 0) begin
            failures++;
            $display("FAIL: latency %0d: result without operand", LATS[g]);
          end else begin
            it = q[g].pop_front();
            if (oy[g] !== ref_sqrt(it.x) || cycle - it.t != LATS[g]) begin
              failures++;
              if (failures < 10)
                $display("FAIL latency %0d: x=%h y=%h exp=%h after %0d cycles",
                         LATS[g], it.x, oy[g], ref_sqrt(it.x), cycle - it.t);
            end
          end
        end
      end
    end
  end

  initial begin
    for (int g = 0; g < NI; g++) n_out[g] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N_OPS; n++) begin
      @(posedge clk);
      if ($urandom_range(0, 4) != 0) begin
        item_t it;
        it.x = {1'b0, 8'($urandom_range(1, 254)), 23'($urandom())};
        it.t = cycle + 1;
        in_valid <= 1'b1;
        in_x <= it.x;
        for (int g = 0; g < NI; g++) q[g].push_back(it);
      end else begin
        in_valid <= 1'b0;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (12) @(posedge clk);
    for (int g = 0; g < NI; g++) begin
      checks++;
      if (q[g].size() != 0 || n_out[g] == 0) begin
        failures++;
        $display("FAIL: latency %0d: %0d results missing", LATS[g], q[g].size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
