// jpg_dct_engine: 8x8 2-D forward DCT in 16 clocks, with the coefficient
// register array the quantizer scans in zig-zag order.
//
// A block is transformed row-column with one shared single-cycle 1-D DCT
// (jpg_dct8). Clocks 0-7 of a run are the horizontal pass: the engine asks
// for image row r on row_idx, receives its eight level-shifted samples on
// row_in in the same clock, and writes the transformed row into row r of a
// 64 x 14-bit register array. Clocks 8-15 are the vertical pass: column c is
// read from the array, transformed with the vertical scaling and written
// back into the same column. After the 16th clock the array holds the final
// coefficients (8 x orthonormal DCT) and `done` pulses for one clock.
//
// Read port: rd_k is a zig-zag scan position (0..63); rd_coef is the
// coefficient at that position, combinationally. The array must not be
// read while busy.
//
// Timing: start is taken when busy is low; busy is then high for exactly
// 16 clocks, one per row or column (the document's 16 clocks per block).
// The 16-clock schedule, the 64 x 14-bit array and the zig-zag read follow
// the document; the start/busy/done handshake is this design's choice.
module jpg_dct_engine
  import jpg_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // horizontal-pass sample fetch
  output logic [2:0]                 row_idx,
  input  logic signed [SAMPLE_W-1:0] row_in [8],
  // zig-zag coefficient read
  input  logic [5:0]                 rd_k,
  output logic signed [COEF_W-1:0]   rd_coef
);

  logic signed [COEF_W-1:0] coef [8][8];   // [row][col]
  logic [3:0]               cnt;
  logic                     dir;
  logic signed [COEF_W-1:0] d_in  [8];
  logic signed [COEF_W-1:0] d_out [8];

  assign dir     = cnt[3];
  assign row_idx = cnt[2:0];

  always_comb begin
    for (int i = 0; i < 8; i++)
      d_in[i] = dir ? coef[i][cnt[2:0]] : COEF_W'(row_in[i]);
  end

  jpg_dct8 u_dct8 (.dir(dir), .in(d_in), .out(d_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= '0;
        end
      end else begin
        cnt <= cnt + 4'd1;
        if (cnt == 4'd15) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // coefficient array: written a row (dir 0) or a column (dir 1) per clock
  always_ff @(posedge clk) begin
    if (busy) begin
      for (int i = 0; i < 8; i++) begin
        if (!dir) coef[cnt[2:0]][i] <= d_out[i];
        else      coef[i][cnt[2:0]] <= d_out[i];
      end
    end
  end

  logic [5:0] nat;
  always_comb begin
    nat     = zigzag(rd_k);
    rd_coef = coef[nat[5:3]][nat[2:0]];
  end

endmodule
