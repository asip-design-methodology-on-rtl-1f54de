// tb_jpg_dct_engine: runs random 8x8 blocks (and flat extreme blocks)
// through the 16-clock 2-D DCT and reads all 64 coefficients back in
// zig-zag order. Expected values come from a floating-point 2-D DCT scaled
// by 8, F(u,v) = 2 C(u) C(v) sum x cos cos with C(0) = 1/sqrt(2); fixed-point
// rounding may differ by at most 2. The zig-zag order is the standard JPEG
// table written out here. Also checks that busy lasts exactly 16 clocks.
module tb_jpg_dct_engine;
  import jpg_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [2:0] row_idx;
  logic signed [SAMPLE_W-1:0] row_in [8];
  logic [5:0] rd_k;
  logic signed [COEF_W-1:0] rd_coef;
  int checks = 0, failures = 0;
  logic signed [7:0] blk [8][8];

  localparam int ZZ [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  jpg_dct_engine dut (.*);

  always #5 clk = ~clk;
  always_comb for (int i = 0; i < 8; i++) row_in[i] = blk[row_idx][i];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block();
    int cyc;
    real pi, s, cu, cv, expv;
    pi = 3.14159265358979;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (busy) begin cyc++; @(negedge clk); end
    checks++;
    if (cyc != 16) begin failures++; $display("FAIL busy lasted %0d clocks", cyc); end
    for (int k = 0; k < 64; k++) begin
      int u, v;
      rd_k = 6'(k);
      #1;
      u = ZZ[k] / 8; v = ZZ[k] % 8;
      s = 0.0;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          s += real'(blk[y][x]) * $cos(real'((2*y+1)*u) * pi / 16.0)
                                * $cos(real'((2*x+1)*v) * pi / 16.0);
      cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
      cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
      expv = 2.0 * cu * cv * s;
      checks++;
      if ((real'(rd_coef) - expv > 2.0) || (expv - real'(rd_coef) > 2.0)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d (u%0d v%0d) got %0d exp %f", k, u, v, rd_coef, expv);
      end
    end
  endtask

  initial begin
    rd_k = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          blk[y][x] = (t < 10) ? $signed(8'($urandom))
                               : $signed(8'(((x + y) * 16 + int'($urandom_range(0, 15))) - 128));
      run_block();
    end
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) blk[y][x] = -128;
    run_block();
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) blk[y][x] = 127;
    run_block();
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) blk[y][x] = ((x + y) % 2) ? 127 : -128;
    run_block();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
