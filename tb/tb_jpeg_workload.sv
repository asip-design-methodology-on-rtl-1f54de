// tb_jpeg_workload: encodes a whole W x H RGB image (default 1600 x 1200,
// the picture size the engine was evaluated on) through the engine at its
// default parameters, MCU by MCU, with the pixel in-FIFO kept fed and the
// out-FIFO always read. Every output byte is compared, as it arrives, with a
// bit-exact reference encoder written here. The picture is synthetic
// (smooth gradients with noise); the quantization tables are the example
// luminance/chrominance tables of the JPEG standard; the Huffman code table
// is a generated one of code lengths 2..12 (any table gives the same
// engine timing apart from out-FIFO stalls). Reports clocks per pixel of
// the engine alone, to compare with the 3.356 clocks/pixel measured for the
// complete processor-plus-engine system.
module tb_jpeg_workload;
  import jpg_pkg::*;

  localparam int W = 1600, H = 1200;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  jpg_cmd_e cmd_op;
  logic [31:0] cmd_arg;
  logic pix_in_valid = 0, pix_in_ready;
  logic [23:0] pix_in_data;
  logic byte_out_valid, byte_out_ready;
  logic [7:0] byte_out_data;
  logic br_active = 0, pipe_stall = 0, pm_we = 0;
  logic [31:0] br_addr = 0, pm_wdata = 0, fe_pc, dc_pc, dc_ir;
  logic [11:0] pm_waddr = 0;
  logic fe_stalled;
  logic [4:0] rf_ra1 = 0, rf_ra2 = 0, rf_wa = 0;
  logic [31:0] rf_rd1, rf_rd2, rf_wd = 0;
  logic rf_we = 0;
  logic dm_we = 0;
  logic [11:0] dm_daddr = 0;
  logic [31:0] dm_din = 0, dm_dout;

  int checks = 0, failures = 0;
  longint n_cycles = 0;
  longint n_bytes = 0;

  jpeg_asip dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) n_cycles++;
  assign byte_out_ready = 1'b1;

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------ reference encoder
  localparam int ZZ [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  int pix_r [16][16], pix_g [16][16], pix_b [16][16];
  int qt [2][64];
  int h_len [1024], h_code [1024];
  int last_dc [3];
  bit bits [$];
  int exp_bytes [$], got_bytes [$];

  function automatic int dsc(int x, int n);
    return (x + (1 << (n - 1))) >>> n;
  endfunction

  // integer 8-point DCT, pass 0 = rows, pass 1 = columns
  function automatic void dct1(ref int d [8], input int pass);
    int a0, a1, a2, a3, a4, a5, a6, a7, e0, e1, e2, e3, zz, c1, c2, c3, c4, c5, sh;
    sh = pass ? 15 : 11;
    a0 = d[0] + d[7]; a7 = d[0] - d[7]; a1 = d[1] + d[6]; a6 = d[1] - d[6];
    a2 = d[2] + d[5]; a5 = d[2] - d[5]; a3 = d[3] + d[4]; a4 = d[3] - d[4];
    e0 = a0 + a3; e3 = a0 - a3; e1 = a1 + a2; e2 = a1 - a2;
    d[0] = pass ? dsc(e0 + e1, 2) : (e0 + e1) * 4;
    d[4] = pass ? dsc(e0 - e1, 2) : (e0 - e1) * 4;
    zz = (e2 + e3) * 4433;
    d[2] = dsc(zz + e3 * 6270, sh);
    d[6] = dsc(zz - e2 * 15137, sh);
    c5 = (a4 + a5 + a6 + a7) * 9633;
    c1 = -(a4 + a7) * 7373;
    c2 = -(a5 + a6) * 20995;
    c3 = -(a4 + a6) * 16069 + c5;
    c4 = -(a5 + a7) * 3196 + c5;
    d[7] = dsc(a4 * 2446 + c1 + c3, sh);
    d[5] = dsc(a5 * 16819 + c2 + c4, sh);
    d[3] = dsc(a6 * 25172 + c2 + c3, sh);
    d[1] = dsc(a7 * 12299 + c1 + c4, sh);
  endfunction

  function automatic int size_of(int v);
    int a, n;
    a = (v < 0) ? -v : v; n = 0;
    while (a > 0) begin n++; a >>= 1; end
    return n;
  endfunction

  function automatic void put(int code, int len);
    for (int i = len - 1; i >= 0; i--) bits.push_back(code[i]);
  endfunction

  function automatic void put_sym(int addr, int v, int s);
    put(h_code[addr], h_len[addr]);
    if (s > 0) put(v < 0 ? v - 1 : v, s);
  endfunction

  function automatic void ref_block(int b);
    int smp [8][8];
    int row [8];
    int coef [64];
    int comp, ch, t, run, last_nz;
    comp = (b < 4) ? 0 : b - 3; ch = (comp != 0); t = ch;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        if (b < 4) begin
          int py, px;
          py = (b / 2) * 8 + y; px = (b % 2) * 8 + x;
          smp[y][x] = (19595 * pix_r[py][px] + 38470 * pix_g[py][px] + 7471 * pix_b[py][px] + 32768) >>> 16;
        end else begin
          int sum;
          sum = 0;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++) begin
              int r, g, bb;
              r = pix_r[2*y+dy][2*x+dx]; g = pix_g[2*y+dy][2*x+dx]; bb = pix_b[2*y+dy][2*x+dx];
              if (b == 4) sum += (-11059 * r - 21709 * g + 32768 * bb + (128 << 16) + 32767) >>> 16;
              else        sum += (32768 * r - 27439 * g - 5329 * bb + (128 << 16) + 32767) >>> 16;
            end
          smp[y][x] = (sum + 2) >> 2;
        end
        smp[y][x] -= 128;
      end
    for (int y = 0; y < 8; y++) begin
      for (int x = 0; x < 8; x++) row[x] = smp[y][x];
      dct1(row, 0);
      for (int x = 0; x < 8; x++) smp[y][x] = row[x];
    end
    for (int x = 0; x < 8; x++) begin
      for (int y = 0; y < 8; y++) row[y] = smp[y][x];
      dct1(row, 1);
      for (int y = 0; y < 8; y++) smp[y][x] = row[y];
    end
    for (int k = 0; k < 64; k++) begin
      int c, a, q;
      c = smp[ZZ[k] / 8][ZZ[k] % 8];
      a = (c < 0) ? -c : c;
      q = (a + 4 * qt[t][k]) / (8 * qt[t][k]);
      coef[k] = (c < 0) ? -q : q;
    end
    // Huffman coding
    begin
      int d;
      d = coef[0] - last_dc[comp];
      put_sym(ch * 256 + size_of(d), d, size_of(d));
      last_dc[comp] = coef[0];
    end
    run = 0;
    for (int k = 1; k < 64; k++) begin
      if (coef[k] == 0) begin
        if (k == 63) put_sym(512 + ch * 256, 0, 0);
        else run++;
      end else begin
        while (run >= 16) begin put_sym(512 + ch * 256 + 'hF0, 0, 0); run -= 16; end
        put_sym(512 + ch * 256 + run * 16 + size_of(coef[k]), coef[k], size_of(coef[k]));
        run = 0;
      end
    end
  endfunction

  function automatic void ref_flush();
    while (bits.size() % 8 != 0) bits.push_back(1'b1);
    while (bits.size() > 0) begin
      int byt;
      byt = 0;
      for (int i = 0; i < 8; i++) byt = (byt << 1) | int'(bits.pop_front());
      exp_bytes.push_back(byt);
      if (byt == 'hFF) exp_bytes.push_back(0);
    end
  endfunction

  function automatic void ref_bytes();
    while (bits.size() >= 8) begin
      int byt;
      byt = 0;
      for (int i = 0; i < 8; i++) byt = (byt << 1) | int'(bits.pop_front());
      exp_bytes.push_back(byt);
      if (byt == 'hFF) exp_bytes.push_back(0);
    end
  endfunction

  // compare each byte as it leaves the out-FIFO
  always @(posedge clk) begin
    if (rst_n && byte_out_valid) begin
      n_bytes++;
      if (exp_bytes.size() == 0) check(0, "unexpected byte");
      else begin
        int e;
        e = exp_bytes.pop_front();
        check(int'(byte_out_data) == e, $sformatf("byte %0d: got %02x expected %02x", n_bytes - 1, byte_out_data, e));
      end
    end
  end

  task automatic issue(jpg_cmd_e op, logic [31:0] arg);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
  endtask

  int pix_queue [$];
  initial begin
    forever begin
      @(negedge clk);
      if (pix_queue.size() > 0) begin
        pix_in_valid = 1; pix_in_data = 24'(pix_queue[0]);
        @(posedge clk);
        if (pix_in_ready) void'(pix_queue.pop_front());
      end else pix_in_valid = 0;
    end
  end

  // example tables of the JPEG standard, natural (row-major) order
  localparam int QL [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,   24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,   72, 92, 95, 98,112,100,103, 99};
  localparam int QC [64] = '{
    17, 18, 24, 47, 99, 99, 99, 99,   18, 21, 26, 66, 99, 99, 99, 99,
    24, 26, 56, 99, 99, 99, 99, 99,   47, 66, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,   99, 99, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,   99, 99, 99, 99, 99, 99, 99, 99};

  function automatic int pixel(int x, int y, int c);
    int v;
    case (c)
      0: v = (x * 255) / W + ((x * y) % 23) - 11;
      1: v = (y * 255) / H + ((x + 3 * y) % 17) - 8;
      default: v = 128 + (((x / 37) + (y / 29)) % 2 ? 60 : -60) + ((x ^ y) % 9);
    endcase
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  initial begin
    longint t0, t1;
    cmd_op = CMD_RESET_DC; cmd_arg = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      qt[0][k] = QL[ZZ[k]];
      qt[1][k] = QC[ZZ[k]];
      issue(CMD_SET_QTAB, {17'd0, 1'b0, 6'(k), 8'(qt[0][k])});
      issue(CMD_SET_QTAB, {17'd0, 1'b1, 6'(k), 8'(qt[1][k])});
    end
    for (int a = 0; a < 1024; a++) begin
      int len, sym;
      sym = a % 256;
      len = 2 + ((sym % 16) + (sym / 16)) % 11;   // short codes for small symbols
      h_len[a] = len;
      h_code[a] = (a * 2654435761) & ((1 << len) - 1);
      if (a < 512 && a[7:4] != 0) continue;
      issue(CMD_SET_HTAB, {1'b0, 10'(a), 5'(len), 16'(h_code[a])});
    end
    issue(CMD_RESET_DC, 0);
    for (int i = 0; i < 3; i++) last_dc[i] = 0;
    t0 = n_cycles;
    for (int my = 0; my < H / 16; my++)
      for (int mx = 0; mx < W / 16; mx++) begin
        for (int y = 0; y < 16; y++)
          for (int x = 0; x < 16; x++) begin
            pix_r[y][x] = pixel(mx * 16 + x, my * 16 + y, 0);
            pix_g[y][x] = pixel(mx * 16 + x, my * 16 + y, 1);
            pix_b[y][x] = pixel(mx * 16 + x, my * 16 + y, 2);
            pix_queue.push_back((pix_r[y][x] << 16) | (pix_g[y][x] << 8) | pix_b[y][x]);
          end
        issue(CMD_COLOR_MCU, 0);
        for (int b = 0; b < 6; b++) begin
          ref_block(b);
          ref_bytes();
          issue(CMD_ENCODE, 32'(b));
        end
      end
    ref_flush();
    issue(CMD_FLUSH, 0);
    do @(posedge clk); while (!cmd_ready);
    t1 = n_cycles;
    repeat (100) @(negedge clk);
    check(exp_bytes.size() == 0, $sformatf("%0d expected bytes never came", exp_bytes.size()));
    $display("image %0dx%0d: %0d bytes, %0d clocks, %f clocks/pixel", W, H, n_bytes, t1 - t0,
             real'(t1 - t0) / real'(W * H));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
