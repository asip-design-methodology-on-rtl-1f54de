// tb_jpg_quant: drives the quantizer with random coefficient blocks (read
// combinationally by zig-zag index) and random tables, and compares every
// event with round-to-nearest division q = (|c| + 4d) / (8d) worked out here:
// the DC value, each non-zero AC value with its zero run, and end-of-block
// when the last coefficient quantizes to zero. Blocks with small divisors
// force the long-division state. With ev_ready held high, the block must take
// 64 clocks plus ceil(bits/3) for each quotient of 8 or more; other blocks run
// with random ev_ready backpressure.
module tb_jpg_quant;
  import jpg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic qtab_we = 0;
  logic [6:0] qtab_addr;
  logic [QTAB_W-1:0] qtab_data;
  logic start = 0, tsel = 0, busy, done;
  logic [5:0] rd_k;
  logic signed [COEF_W-1:0] rd_coef;
  logic ev_valid, ev_ready;
  qevent_t ev;
  int checks = 0, failures = 0, n_long = 0;

  logic signed [COEF_W-1:0] coefs [64];   // zig-zag order
  int qt [2][64];

  jpg_quant dut (.*);
  always #5 clk = ~clk;
  assign rd_coef = coefs[rd_k];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  function automatic int bitlen(int x);
    int n = 0;
    while (x > 0) begin n++; x >>= 1; end
    return n;
  endfunction

  task automatic run_block(int t, bit backpressure);
    int exp_val [$], exp_run [$], exp_dc [$], exp_eob [$];
    int run, d, a, qc, cyc, exp_cyc, got;
    run = 0; exp_cyc = 64;
    for (int k = 0; k < 64; k++) begin
      d  = qt[t][k];
      a  = (coefs[k] < 0) ? -int'(coefs[k]) : int'(coefs[k]);
      qc = (a + 4 * d) / (8 * d);
      if (qc >= 8) exp_cyc += (bitlen(a + 4 * d) + 2) / 3;
      if (k == 0 || qc != 0) begin
        exp_dc.push_back(k == 0); exp_eob.push_back(0); exp_run.push_back(run);
        exp_val.push_back(coefs[k] < 0 ? -qc : qc);
        run = 0;
      end else if (k == 63) begin
        exp_dc.push_back(0); exp_eob.push_back(1); exp_run.push_back(run); exp_val.push_back(0);
      end else run++;
    end
    @(negedge clk); start = 1; tsel = t[0];
    @(negedge clk); start = 0;
    cyc = 1; got = 0;
    while (1) begin
      ev_ready = backpressure ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (ev_valid && ev_ready) begin
        if (got < exp_val.size()) begin
          check(ev.is_dc == exp_dc[got] && ev.eob == exp_eob[got] &&
                (exp_eob[got] || (int'(ev.val) == exp_val[got] && (exp_dc[got] || int'(ev.run) == exp_run[got]))),
                $sformatf("event %0d: dc=%0d eob=%0d run=%0d val=%0d, expected dc=%0d eob=%0d run=%0d val=%0d",
                          got, ev.is_dc, ev.eob, ev.run, ev.val, exp_dc[got], exp_eob[got], exp_run[got], exp_val[got]));
        end else check(0, "extra event");
        got++;
      end
      if (dut.state == 2'd2) n_long++;
      @(negedge clk);
      if (done) break;
      cyc++;
    end
    check(got == exp_val.size(), $sformatf("got %0d events, expected %0d", got, exp_val.size()));
    if (!backpressure) check(cyc == exp_cyc, $sformatf("block took %0d clocks, expected %0d", cyc, exp_cyc));
  endtask

  initial begin
    ev_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      int t;
      t = blk % 2;
      for (int k = 0; k < 64; k++) begin
        qt[t][k] = (blk % 4 < 2) ? $urandom_range(1, 4) : $urandom_range(1, 255);
        @(negedge clk); qtab_we = 1; qtab_addr = {t[0], 6'(k)}; qtab_data = 8'(qt[t][k]);
      end
      @(negedge clk); qtab_we = 0;
      for (int k = 0; k < 64; k++) begin
        // mostly small AC values, a wide DC, occasional large values
        if (k == 0)                           coefs[k] = COEF_W'(int'($urandom_range(0, 16383)) - 8192);
        else if ($urandom_range(0, 9) == 0)   coefs[k] = COEF_W'(int'($urandom_range(0, 8000)) - 4000);
        else if ($urandom_range(0, 2) == 0)   coefs[k] = COEF_W'(int'($urandom_range(0, 80)) - 40);
        else                                  coefs[k] = 0;
      end
      run_block(t, blk >= 20);
    end
    check(n_long > 0, "long division never used");
    $display("long-division clocks: %0d", n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
