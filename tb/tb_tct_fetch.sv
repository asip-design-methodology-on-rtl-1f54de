// tb_tct_fetch: loads the program memory with words that encode their own
// address, then runs random stalls and branches. Every clock after the first
// fetch the DC-stage instruction ir must be the word at cur_pc, and cur_pc
// must follow the program order: unchanged over a stall, +4 after a normal
// fetch, the branch target after a taken branch. Also counts that stalls
// and branches (including a branch in the clock a stall ends) occurred.
module tb_tct_fetch;
  localparam int PM = 256;
  logic clk = 0, rst_n = 0;
  logic br_active = 0, stalled = 0, pm_we = 0;
  logic [31:0] br_addr = 0, pm_wdata, pc, cur_pc, nxt_pc, ir;
  logic [7:0] pm_waddr;
  int checks = 0, failures = 0, n_stall = 0, n_br = 0;

  tct_fetch #(.PM_SIZE(PM)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(logic [31:0] a);
    return 32'hC0DE_0000 | 32'(a[9:2]);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_cur, exp_nxt, fpc;
    logic started;
    for (int i = 0; i < PM; i++) begin
      @(negedge clk); pm_we = 1; pm_waddr = 8'(i); pm_wdata = word_at(32'(i * 4));
    end
    @(negedge clk) pm_we = 0;
    rst_n = 1;
    exp_cur = 0; exp_nxt = 0; started = 0;
    for (int t = 0; t < 3000; t++) begin
      stalled   = ($urandom_range(0, 3) == 0);
      br_active = !stalled && ($urandom_range(0, 9) == 0);
      br_addr   = 32'($urandom_range(0, PM - 1) * 4);
      #1;
      fpc = br_active ? br_addr : exp_nxt;
      checks++;
      if (pc != fpc) begin failures++; if (failures < 10) $display("FAIL pc %h expected %h", pc, fpc); end
      @(posedge clk);
      if (stalled) n_stall++;
      if (br_active) n_br++;
      if (!stalled) begin exp_cur = fpc; exp_nxt = fpc + 4; started = 1; end
      @(negedge clk);
      if (started) begin
        checks += 2;
        if (cur_pc != exp_cur) begin failures++; if (failures < 10) $display("FAIL cur_pc %h expected %h", cur_pc, exp_cur); end
        if (ir != word_at(exp_cur)) begin failures++; if (failures < 10) $display("FAIL ir %h expected %h", ir, word_at(exp_cur)); end
      end
    end
    checks++;
    if (n_stall == 0 || n_br == 0) failures++;
    $display("stalls=%0d branches=%0d", n_stall, n_br);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
