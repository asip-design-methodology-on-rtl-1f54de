// tb_jpeg_asip: end-to-end test of the JPEG encoder engine at its default
// parameters. It loads quantization and Huffman tables through the command
// port, encodes NMCU 16x16 MCUs (6 blocks each: Y0-Y3, Cb, Cr) with random
// pixel-supply gaps and random out-FIFO backpressure, flushes, and compares
// the whole byte stream with a bit-exact reference encoder written here as
// plain integer functions (fixed-point colour conversion, integer row-column
// DCT, rounding division, Huffman coding with DC prediction, ZRL, EOB, byte
// stuffing, 1-bit padding).
// It also drives the fetch stage with a program and checks that ir follows
// cur_pc while custom instructions stall the pipeline, and exercises the
// register file and data memory. Each mechanism must occur at least once:
// in-FIFO empty, out-FIFO full, long division, ZRL, EOB, byte stuffing,
// Huffman buffer stall, pipeline stall by a custom instruction, a branch.
// The DCT must stay busy exactly 16 clocks per block and an MCU's colour
// conversion must take at least 256 clocks (one pixel per clock).
module tb_jpeg_asip;
  import jpg_pkg::*;

  localparam int NMCU = 3;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  jpg_cmd_e cmd_op;
  logic [31:0] cmd_arg;
  logic pix_in_valid = 0, pix_in_ready;
  logic [23:0] pix_in_data;
  logic byte_out_valid, byte_out_ready;
  logic [7:0] byte_out_data;
  logic br_active = 0, pipe_stall = 0, pm_we = 0;
  logic [31:0] br_addr = 0, pm_wdata, fe_pc, dc_pc, dc_ir;
  logic [11:0] pm_waddr;
  logic fe_stalled;
  logic [4:0] rf_ra1, rf_ra2, rf_wa;
  logic [31:0] rf_rd1, rf_rd2, rf_wd;
  logic rf_we = 0;
  logic dm_we = 0;
  logic [11:0] dm_daddr = 0;
  logic [31:0] dm_din = 0, dm_dout;

  int checks = 0, failures = 0;
  int n_in_empty = 0, n_out_full = 0, n_long = 0, n_zrl = 0, n_eob = 0;
  int n_stuff = 0, n_hstall = 0, n_pstall = 0, n_branch = 0;
  bit out_enable = 1;
  int n_cycles = 0, dct_run = 0;
  always @(posedge clk) n_cycles++;

  jpeg_asip dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // ------------------------------------------------------- monitors
  always @(posedge clk) begin
    if (rst_n && byte_out_valid && byte_out_ready) got_bytes.push_back(byte_out_data);
    // the 2-D DCT of a block keeps the DCT busy for exactly 16 clocks
    if (rst_n && dut.dct_busy) dct_run++;
    else if (dct_run != 0) begin
      check(dct_run == 16, $sformatf("DCT busy for %0d clocks", dct_run));
      dct_run = 0;
    end
    byte_out_ready <= out_enable && ($urandom_range(0, 3) != 0);
    if (rst_n) begin
      if (dut.state == 3'd1 && !dut.if_valid) n_in_empty++;
      if (dut.h_out_valid && !dut.h_out_ready) n_out_full++;
      if (dut.u_quant.state == 2'd2) n_long++;
      if (dut.u_huff.zrl_emit) n_zrl++;
      if (dut.ev_valid && dut.ev_ready && dut.ev.eob) n_eob++;
      if (dut.u_huff.stuff_emit) n_stuff++;
      if (dut.ev_valid && !dut.ev_ready && !dut.u_huff.zrl_emit) n_hstall++;
      if (cmd_valid && !cmd_ready) n_pstall++;
      if (br_active) n_branch++;
    end
  end

  // the fetch stage: ir must always be the word at cur_pc once fetching
  logic fetch_started = 0;
  always @(negedge clk) begin
    if (rst_n && fetch_started) begin
      checks++;
      if (dc_ir != (32'hA5000000 | 32'(dc_pc[13:2]))) begin
        failures++;
        if (failures < 15) $display("FAIL ir %h at cur_pc %h", dc_ir, dc_pc);
      end
    end
  end

  task automatic issue(jpg_cmd_e op, logic [31:0] arg);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
  endtask

  // pixel source with random gaps
  int pix_queue [$];
  initial begin
    forever begin
      @(negedge clk);
      if (pix_queue.size() > 0 && $urandom_range(0, 4) != 0) begin
        pix_in_valid = 1; pix_in_data = 24'(pix_queue[0]);
        @(posedge clk);
        if (pix_in_ready) void'(pix_queue.pop_front());
      end else pix_in_valid = 0;
    end
  end

  initial begin
    int t_color;
    cmd_op = CMD_RESET_DC; cmd_arg = 0;
    rf_ra1 = 0; rf_ra2 = 0; rf_wa = 0; rf_wd = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); pm_we = 1; pm_waddr = 12'(i); pm_wdata = 32'hA5000000 | 32'(i);
    end
    @(negedge clk); pm_we = 0;
    rst_n = 1;
    fetch_started = 0;
    @(negedge clk);
    @(negedge clk) fetch_started = 1;
    // tables: small luma divisors for low frequencies force long division,
    // large ones for high frequencies give long zero runs
    for (int k = 0; k < 64; k++) begin
      qt[0][k] = (k < 10) ? $urandom_range(1, 3) : $urandom_range(60, 255);
      qt[1][k] = (k < 3) ? $urandom_range(1, 4) : $urandom_range(20, 255);
      issue(CMD_SET_QTAB, {17'd0, 1'b0, 6'(k), 8'(qt[0][k])});
      issue(CMD_SET_QTAB, {17'd0, 1'b1, 6'(k), 8'(qt[1][k])});
    end
    for (int a = 0; a < 1024; a++) begin
      int len;
      len = $urandom_range(2, 16);
      h_len[a] = len;
      h_code[a] = ($urandom_range(0, 3) == 0) ? (1 << len) - 1 : int'($urandom) & ((1 << len) - 1);
      if (a < 512 && a[7:4] != 0) continue;
      issue(CMD_SET_HTAB, {1'b0, 10'(a), 5'(len), 16'(h_code[a])});
    end
    // register file through the top
    @(negedge clk); rf_we = 1; rf_wa = 5'd7; rf_wd = 32'h1234_5678;
    @(negedge clk); rf_we = 0; rf_ra1 = 5'd7; rf_ra2 = 5'd0;
    #1 check(rf_rd1 == 32'h1234_5678 && rf_rd2 == 0, "register file read-back");
    // data memory through the top
    @(negedge clk); dm_we = 1; dm_daddr = 12'd99; dm_din = 32'hCAFE_F00D;
    @(negedge clk); dm_we = 0;
    @(negedge clk); check(dm_dout == 32'hCAFE_F00D, "data memory read-back");
    issue(CMD_RESET_DC, 0);
    for (int i = 0; i < 3; i++) last_dc[i] = 0;
    for (int m = 0; m < NMCU; m++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          if (m == 1) begin   // smooth gradient with light noise
            pix_r[y][x] = 8 * x + $urandom_range(0, 7);
            pix_g[y][x] = 8 * y + 100;
            pix_b[y][x] = 255 - 8 * x;
          end else begin
            pix_r[y][x] = $urandom_range(0, 255);
            pix_g[y][x] = $urandom_range(0, 255);
            pix_b[y][x] = $urandom_range(0, 255);
          end
          pix_queue.push_back((pix_r[y][x] << 16) | (pix_g[y][x] << 8) | pix_b[y][x]);
        end
      issue(CMD_COLOR_MCU, 0);
      t_color = n_cycles;
      do @(posedge clk); while (!cmd_ready);
      t_color = n_cycles - t_color;
      // one pixel per clock at best: 256 pixels plus command overhead
      check(t_color >= 256, $sformatf("MCU colour conversion took %0d clocks", t_color));
      $display("MCU %0d colour conversion command: %0d clocks", m, t_color);
      for (int b = 0; b < 6; b++) begin
        ref_block(b);
        if (b == 2) begin
          // a branch, then a stall from the rest of the pipeline
          @(negedge clk) br_active = 1; br_addr = 32'h100;
          @(negedge clk) br_active = 0; pipe_stall = 1;
          @(negedge clk) pipe_stall = 0;
        end
        if (m == 0 && b == 1)   // let the out-FIFO fill up for a while
          fork begin out_enable = 0; repeat (150) @(negedge clk); out_enable = 1; end join_none
        issue(CMD_ENCODE, 32'(b));
      end
    end
    issue(CMD_FLUSH, 0);
    ref_flush();
    repeat (200) @(negedge clk);
    check(got_bytes.size() == exp_bytes.size(),
          $sformatf("got %0d bytes, expected %0d", got_bytes.size(), exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < got_bytes.size(); i++)
      check(got_bytes[i] == exp_bytes[i],
            $sformatf("byte %0d: got %02x expected %02x", i, got_bytes[i], exp_bytes[i]));
    check(n_in_empty > 0, "in-FIFO never ran empty");
    check(n_out_full > 0, "out-FIFO never full");
    check(n_long > 0,     "long division never used");
    check(n_zrl > 0,      "no ZRL code");
    check(n_eob > 0,      "no end of block");
    check(n_stuff > 0,    "no stuffed byte");
    check(n_hstall > 0,   "Huffman buffer never stalled the quantizer");
    check(n_pstall > 0,   "custom instruction never stalled the pipeline");
    check(n_branch > 0,   "no branch");
    $display("bytes=%0d in_empty=%0d out_full=%0d long_div=%0d zrl=%0d eob=%0d stuffed=%0d huff_stall=%0d pipe_stall=%0d branch=%0d",
             got_bytes.size(), n_in_empty, n_out_full, n_long, n_zrl, n_eob, n_stuff, n_hstall, n_pstall, n_branch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
