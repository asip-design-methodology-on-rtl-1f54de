// tb_jpg_color_conv: streams random 16x16 MCUs (with gaps in pix_valid)
// into the colour converter and reads back all six blocks row by row.
// Expected samples are computed here in floating point: Y, Cb and Cr from
// the JFIF matrix, rounded, and chroma as the rounded mean of each 2x2
// square of the rounded full-resolution Cb/Cr values; all level-shifted by
// -128. Fixed-point rounding may differ by 1. Also checks the mcu_done pulse
// and that the conversion sustains one pixel per clock.
module tb_jpg_color_conv;
  import jpg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [23:0] pix_rgb;
  logic mcu_done;
  logic [2:0] rd_blk, rd_row;
  logic signed [7:0] rd_data [8];
  int checks = 0, failures = 0;
  int ey [16][16], ecb [16][16], ecr [16][16];

  jpg_color_conv dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real x);
    return int'($floor(x + 0.5));
  endfunction

  task automatic check(int got, int expv, string what);
    checks++;
    if (got - expv > 1 || expv - got > 1) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    int ndone, cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 8; m++) begin
      ndone = 0; cyc = 0;
      for (int n = 0; n < 256; n++) begin
        int r, g, b, x, y;
        x = n % 16; y = n / 16;
        r = $urandom_range(0, 255); g = $urandom_range(0, 255); b = $urandom_range(0, 255);
        if (m == 1) begin r = 255; g = 0; b = 255; end   // saturating corner
        if (m == 2) begin r = 0; g = 255; b = 0; end
        ey[y][x]  = rnd(0.299 * r + 0.587 * g + 0.114 * b);
        ecb[y][x] = rnd(-0.16874 * r - 0.33126 * g + 0.5 * b + 128.0);
        ecr[y][x] = rnd(0.5 * r - 0.41869 * g - 0.08131 * b + 128.0);
        if (ecb[y][x] > 255) ecb[y][x] = 255;
        if (ecr[y][x] > 255) ecr[y][x] = 255;
        if (m >= 4 && $urandom_range(0, 3) == 0) begin
          @(negedge clk) pix_valid = 0;
          if (mcu_done) ndone++;
        end
        @(negedge clk);
        if (mcu_done) ndone++;
        pix_valid = 1; pix_rgb = {8'(r), 8'(g), 8'(b)};
        cyc++;
      end
      @(negedge clk) pix_valid = 0;
      if (mcu_done) ndone++;
      @(negedge clk);
      if (mcu_done) ndone++;
      checks++;
      if (ndone != 1) begin failures++; $display("FAIL mcu_done pulses %0d", ndone); end
      if (m < 4) begin
        checks++;
        if (cyc != 256) begin failures++; $display("FAIL 256 pixels took %0d clocks", cyc); end
      end
      for (int bk = 0; bk < 6; bk++)
        for (int row = 0; row < 8; row++) begin
          rd_blk = 3'(bk); rd_row = 3'(row);
          #1;
          for (int i = 0; i < 8; i++) begin
            int e;
            if (bk < 4) e = ey[(bk / 2) * 8 + row][(bk % 2) * 8 + i];
            else if (bk == 4)
              e = rnd((ecb[2*row][2*i] + ecb[2*row][2*i+1] + ecb[2*row+1][2*i] + ecb[2*row+1][2*i+1]) / 4.0);
            else
              e = rnd((ecr[2*row][2*i] + ecr[2*row][2*i+1] + ecr[2*row+1][2*i] + ecr[2*row+1][2*i+1]) / 4.0);
            check(int'(rd_data[i]), e - 128, $sformatf("mcu %0d blk %0d row %0d col %0d", m, bk, row, i));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
