// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, count, and that in_ready/out_valid report full and empty exactly
// (a full FIFO must refuse, an empty one must not present data).
module tb_sync_fifo;
  localparam int W = 8, D = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  int model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int phase;
      phase = (t / 500) % 2;     // alternate fill-biased and drain-biased phases
      in_valid  = ($urandom_range(0, 9) < (phase ? 3 : 8));
      out_ready = ($urandom_range(0, 9) < (phase ? 8 : 3));
      in_data   = W'($urandom);
      #1;
      check(in_ready == (model.size() < D), "in_ready wrong");
      check(out_valid == (model.size() > 0), "out_valid wrong");
      check(int'(count) == model.size(), "count wrong");
      if (out_valid && model.size() > 0) check(out_data == W'(model[0]), "data order wrong");
      if (model.size() == D) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(int'(in_data));
      @(negedge clk);
    end
    check(n_full > 0 && n_empty > 0, "full or empty never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
