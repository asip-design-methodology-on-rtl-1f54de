// tb_jpg_huff: loads random code tables (many all-ones codes, to provoke
// 0xFF bytes), sends random coefficient events for blocks of all three
// components, flushes, and compares every output byte with a bit stream
// built here: per event the code of its symbol followed by the extra bits,
// DC values coded as differences per component, runs of 16+ zeros preceded
// by ZRL codes, a 0x00 after each 0xFF byte, and 1-bit padding at the flush.
// Output readiness is random, so the buffer-full stall is exercised.
module tb_jpg_huff;
  import jpg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic htab_we = 0;
  logic [9:0] htab_addr;
  logic [4:0] htab_len;
  logic [15:0] htab_code;
  logic dc_clear = 0, flush = 0, drained;
  logic [1:0] comp = 0;
  logic ev_valid = 0, ev_ready;
  qevent_t ev;
  logic out_valid, out_ready;
  logic [7:0] out_data;
  logic zrl_emit, stuff_emit;
  int checks = 0, failures = 0;
  int n_zrl = 0, n_stuff = 0, n_stall = 0;

  int tab_len [1024];
  int tab_code [1024];
  bit bits [$];          // expected bit stream, oldest first
  int exp_bytes [$];
  int got_bytes [$];
  int last_dc [3];
  bit force_ready = 0;

  jpg_huff dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && out_ready) got_bytes.push_back(out_data);
    if (zrl_emit) n_zrl++;
    if (stuff_emit) n_stuff++;
    if (ev_valid && !ev_ready && !zrl_emit) n_stall++;
    out_ready <= force_ready || ($urandom_range(0, 3) != 0);
  end

  function automatic int size_of(int v);
    int a = (v < 0) ? -v : v, n = 0;
    while (a > 0) begin n++; a >>= 1; end
    return n;
  endfunction

  function automatic void put(int code, int len);
    for (int i = len - 1; i >= 0; i--) bits.push_back(code[i]);
  endfunction

  function automatic void put_sym(int addr, int v, int s);
    put(tab_code[addr], tab_len[addr]);
    if (s > 0) put(v < 0 ? v - 1 : v, s);
  endfunction

  task automatic send(bit is_dc, bit eob, int run, int val, int c);
    int ch = (c != 0);
    // model
    if (is_dc) begin
      int d = val - last_dc[c];
      put_sym(ch * 256 + size_of(d), d, size_of(d));
      last_dc[c] = val;
    end else if (eob) begin
      put_sym(512 + ch * 256, 0, 0);
    end else begin
      int r = run;
      while (r >= 16) begin put_sym(512 + ch * 256 + 'hF0, 0, 0); r -= 16; end
      put_sym(512 + ch * 256 + r * 16 + size_of(val), val, size_of(val));
    end
    // drive
    @(negedge clk);
    comp = 2'(c);
    ev_valid = 1; ev.is_dc = is_dc; ev.eob = eob; ev.run = 6'(run); ev.val = QVAL_W'(val);
    do @(posedge clk); while (!ev_ready);
    @(negedge clk) ev_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      int len;
      len = $urandom_range(1, 16);
      tab_len[a]  = len;
      tab_code[a] = ($urandom_range(0, 2) == 0) ? (1 << len) - 1 : int'($urandom) & ((1 << len) - 1);
      if (a < 512 && a[7:4] != 0) continue;   // DC tables hold 16 symbols each
      @(negedge clk); htab_we = 1; htab_addr = 10'(a);
      htab_len = 5'(len); htab_code = 16'(tab_code[a]);
    end
    @(negedge clk) htab_we = 0;
    // rate: short code words (at most 8 bits each) go in at one per clock
    begin
      int cyc;
      for (int a = 512; a < 1024; a++) begin
        tab_len[a] = 2; tab_code[a] = a % 4;
        @(negedge clk); htab_we = 1; htab_addr = 10'(a); htab_len = 5'd2; htab_code = 16'(a % 4);
      end
      @(negedge clk) htab_we = 0; force_ready = 1;
      @(negedge clk);
      comp = 0; cyc = 0;
      for (int i = 0; i < 64; i++) begin
        int v;
        v = (i % 2) ? -int'(1 + i % 7) : int'(1 + i % 7);
        put_sym(512 + (i % 3) * 16 + size_of(v), v, size_of(v));
        ev_valid = 1; ev.is_dc = 0; ev.eob = 0; ev.run = 6'(i % 3); ev.val = QVAL_W'(v);
        @(posedge clk);
        while (!ev_ready) begin cyc++; @(posedge clk); end
        cyc++;
        @(negedge clk);
      end
      ev_valid = 0;
      checks++;
      if (cyc != 64) begin failures++; $display("FAIL 64 code words took %0d clocks", cyc); end
      force_ready = 0;
    end
    for (int b = 0; b < 60; b++) begin
      int c, run;
      c = b % 3; run = 0;
      send(1, 0, 0, int'($urandom_range(0, 2047)) - 1024, c);
      for (int k = 1; k < 64; k++) begin
        if ($urandom_range(0, 3) == 0 || (b % 5 == 0 && k == 40)) begin
          int v;
          v = int'($urandom_range(1, 200));
          if ($urandom_range(0, 7) == 0) v = int'($urandom_range(1, 1023));
          if ($urandom_range(0, 1) == 0) v = -v;
          send(0, 0, run, v, c);
          run = 0;
        end else if (k == 63) begin
          send(0, 1, run, 0, c);
        end else run++;
      end
    end
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    while (bits.size() % 8 != 0) bits.push_back(1'b1);
    while (bits.size() > 0) begin
      int byt;
      byt = 0;
      for (int i = 0; i < 8; i++) byt = (byt << 1) | int'(bits.pop_front());
      exp_bytes.push_back(byt);
      if (byt == 'hFF) exp_bytes.push_back(0);
    end
    while (!drained) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (got_bytes.size() != exp_bytes.size()) begin
      failures++;
      $display("FAIL got %0d bytes, expected %0d", got_bytes.size(), exp_bytes.size());
    end
    for (int i = 0; i < exp_bytes.size() && i < got_bytes.size(); i++) begin
      checks++;
      if (got_bytes[i] != exp_bytes[i]) begin
        failures++;
        if (failures < 10) $display("FAIL byte %0d: got %02x expected %02x", i, got_bytes[i], exp_bytes[i]);
      end
    end
    checks += 3;
    if (n_zrl == 0)   begin failures++; $display("FAIL no ZRL emitted"); end
    if (n_stuff == 0) begin failures++; $display("FAIL no byte stuffed"); end
    if (n_stall == 0) begin failures++; $display("FAIL buffer never stalled the input"); end
    $display("bytes=%0d zrl=%0d stuffed=%0d stall_clocks=%0d", got_bytes.size(), n_zrl, n_stuff, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
