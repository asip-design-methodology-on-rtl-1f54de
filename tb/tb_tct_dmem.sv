// tb_tct_dmem: random writes and reads against an array model; dout must be
// the word at the previous clock's address as it was before that clock's
// write (registered read, old data on a same-address write).
module tb_tct_dmem;
  localparam int N = 256;
  logic clk = 0, we = 0;
  logic [7:0] daddr;
  logic [31:0] din, dout;
  int checks = 0, failures = 0;
  logic [31:0] model [N];

  tct_dmem #(.DM_SIZE(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; daddr = 8'(i); din = 32'(i) * 32'h01010101; model[i] = din;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0); daddr = 8'($urandom); din = $urandom;
      expv = model[daddr];
      @(posedge clk);
      if (we) model[daddr] = din;
      @(negedge clk);
      checks++;
      if (dout != expv) begin failures++; if (failures < 10) $display("FAIL dout %h expected %h", dout, expv); end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
