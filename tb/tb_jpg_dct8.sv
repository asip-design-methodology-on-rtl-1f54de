// tb_jpg_dct8: checks the single-cycle 8-point DCT against a floating-point
// DCT. For dir 0 (horizontal pass, 8-bit level-shifted samples) the expected
// output is 4 * sqrt(2) * c(k) * sum x[n] cos((2n+1) k pi / 16) with
// c(0) = 1/sqrt(2), c(k) = 1 otherwise; for dir 1 (vertical pass, 14-bit
// inputs) the same sum scaled by 1/4. Fixed-point rounding may differ by at
// most 2. Random vectors plus the extreme all-max and all-min inputs.
module tb_jpg_dct8;
  import jpg_pkg::*;

  logic                    dir;
  logic signed [COEF_W-1:0] in  [8];
  logic signed [COEF_W-1:0] out [8];
  int checks = 0, failures = 0;

  jpg_dct8 dut (.dir, .in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec();
    real expv, s, pi;
    pi = 3.14159265358979;
    #1;
    for (int k = 0; k < 8; k++) begin
      s = 0.0;
      for (int n = 0; n < 8; n++) s += real'(in[n]) * $cos(real'((2*n+1)*k) * pi / 16.0);
      expv = (k == 0) ? s : s * $sqrt(2.0);
      expv = dir ? expv / 4.0 : expv * 4.0;
      checks++;
      if ((real'(out[k]) - expv > 2.0) || (expv - real'(out[k]) > 2.0)) begin
        failures++;
        if (failures < 10) $display("FAIL dir=%0d k=%0d out=%0d expv=%f", dir, k, out[k], expv);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      dir = t[0];
      for (int n = 0; n < 8; n++) begin
        if (!dir) in[n] = COEF_W'($signed(8'($urandom)));
        else      in[n] = COEF_W'(int'($urandom_range(0, 8190)) - 4095);
      end
      check_vec();
    end
    dir = 0; for (int n = 0; n < 8; n++) in[n] = -128; check_vec();
    dir = 0; for (int n = 0; n < 8; n++) in[n] = (n < 4) ? 127 : -128; check_vec();
    dir = 1; for (int n = 0; n < 8; n++) in[n] = -4096; check_vec();
    dir = 1; for (int n = 0; n < 8; n++) in[n] = n[0] ? 4095 : -4096; check_vec();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
