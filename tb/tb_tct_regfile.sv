// tb_tct_regfile: random writes and reads on both ports against an array
// model, for the 32-register and the 16-register configuration; checks the
// reset value and that a same-clock read returns the old value.
module tb_tct_regfile;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd, rd1s, rd2s;
  logic we = 0;
  logic [3:0] sa1, sa2, swa;

  tct_regfile #(.GPR_COUNT(32)) dut32 (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);
  tct_regfile #(.GPR_COUNT(16)) dut16 (.clk, .rst_n, .ra1(sa1), .rd1(rd1s), .ra2(sa2), .rd2(rd2s),
                                       .we, .wa(swa), .wd);
  always #5 clk = ~clk;
  assign sa1 = ra1[3:0]; assign sa2 = ra2[3:0]; assign swa = wa[3:0];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] expv);
    checks++;
    if (got !== expv) begin failures++; if (failures < 10) $display("FAIL got %h expected %h", got, expv); end
  endtask

  initial begin
    logic [31:0] m32 [32];
    logic [31:0] m16 [16];
    for (int i = 0; i < 32; i++) m32[i] = 0;
    for (int i = 0; i < 16; i++) m16[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      we  = ($urandom_range(0, 1) == 1);
      wa  = 5'($urandom); wd = $urandom;
      ra1 = (t % 7 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      check(rd1, m32[ra1]); check(rd2, m32[ra2]);
      check(rd1s, m16[ra1[3:0]]); check(rd2s, m16[ra2[3:0]]);
      @(posedge clk);
      if (we) begin m32[wa] = wd; m16[wa[3:0]] = wd; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
