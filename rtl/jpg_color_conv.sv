// jpg_color_conv: RGB -> YCbCr colour conversion with 4:2:0 chroma
// downsampling, one RGB pixel per clock, and the YCbCr block memory the DCT
// reads eight samples at a time.
//
// Pixels of one 16x16 MCU arrive in raster order (pixel n is at x = n % 16,
// y = n / 16). Each is converted with fixed-point weights (16 fraction bits):
//   Y  =  0.299 R + 0.587 G + 0.114 B
//   Cb = -0.16874 R - 0.33126 G + 0.5 B + 128
//   Cr =  0.5 R - 0.41869 G - 0.08131 B + 128
// rounded to nearest (Cb and Cr with a bias one below one half, so that the
// result never exceeds 255). Y is written into four 8x8 blocks. Cb and Cr are
// summed over each 2x2 pixel square in 10-bit accumulators: the top-left
// pixel of a square writes, the other three add. A chroma sample is read as
// (sum + 2) >> 2.
//
// Read port: blocks 0..3 are the Y blocks (top-left, top-right, bottom-left,
// bottom-right), 4 is Cb and 5 is Cr. rd_blk/rd_row select one 8-sample row,
// returned combinationally with 128 subtracted (signed samples for the DCT).
// Timing: pix_valid with an RGB pixel each clock; mcu_done pulses the clock
// after the 256th pixel, and the pixel counter wraps to the next MCU.
// The 1 pixel/clock rate, the 3x3 matrix with shift and rounding, the 4:2:0
// downsampling and the 8-pixel-wide read follow the document; the weights,
// the rounding and the memory organisation are this design's choices.
// Image-edge replication is left to the software that feeds the pixels.
module jpg_color_conv
  import jpg_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       pix_valid,
  input  logic [3*SAMPLE_W-1:0]      pix_rgb,     // {R, G, B}
  output logic                       mcu_done,
  input  logic [2:0]                 rd_blk,
  input  logic [2:0]                 rd_row,
  output logic signed [SAMPLE_W-1:0] rd_data [8]
);

  logic [7:0] pix_cnt;
  logic [7:0] ymem  [4][8][8];   // [block][row][col]
  logic [9:0] cbacc [8][8];
  logic [9:0] cracc [8][8];

  logic [7:0] r, g, b;
  logic [7:0] y, cb, cr;
  int         ty, tcb, tcr;

  always_comb begin
    {r, g, b} = pix_rgb;
    ty  = CC_Y_R * int'(r) + CC_Y_G * int'(g) + CC_Y_B * int'(b) + CC_HALF;
    tcb = -CC_CB_R * int'(r) - CC_CB_G * int'(g) + CC_HALF * int'(b)
          + (128 << CC_BITS) + CC_HALF - 1;
    tcr = CC_HALF * int'(r) - CC_CR_G * int'(g) - CC_CR_B * int'(b)
          + (128 << CC_BITS) + CC_HALF - 1;
    y  = 8'(ty  >>> CC_BITS);
    cb = 8'(tcb >>> CC_BITS);
    cr = 8'(tcr >>> CC_BITS);
  end

  logic [3:0] px, py;
  assign px = pix_cnt[3:0];
  assign py = pix_cnt[7:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt  <= '0;
      mcu_done <= 1'b0;
    end else begin
      mcu_done <= pix_valid && (pix_cnt == 8'hFF);
      if (pix_valid) pix_cnt <= pix_cnt + 8'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      ymem[{py[3], px[3]}][py[2:0]][px[2:0]] <= y;
      if (!px[0] && !py[0]) begin
        cbacc[py[3:1]][px[3:1]] <= 10'(cb);
        cracc[py[3:1]][px[3:1]] <= 10'(cr);
      end else begin
        cbacc[py[3:1]][px[3:1]] <= cbacc[py[3:1]][px[3:1]] + 10'(cb);
        cracc[py[3:1]][px[3:1]] <= cracc[py[3:1]][px[3:1]] + 10'(cr);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic [9:0] sum;
      logic [7:0] smp;
      sum = (rd_blk == 3'd5) ? cracc[rd_row][i] : cbacc[rd_row][i];
      if (rd_blk < 3'd4) smp = ymem[rd_blk[1:0]][rd_row][i];
      else               smp = 8'((sum + 10'd2) >> 2);
      rd_data[i] = signed'(smp ^ 8'h80);   // smp - 128
    end
  end

endmodule
