// jpg_dct8: single-cycle 8-point 1-D forward DCT.
//
// One call computes a whole row (dir = 0, horizontal pass) or a whole column
// (dir = 1, vertical pass) of an 8x8 block in one clock: the even part is a
// butterfly plus three constant multiplies, the odd part is a butterfly plus
// nine constant multiplies, twelve multiplies and 32 additions in all. The
// two passes share this hardware and differ only in their scaling:
//   dir 0: out[0], out[4] = sum << PASS1_BITS,   others DESCALE(x, CB0)
//   dir 1: out[0], out[4] = DESCALE(sum, PASS1_BITS), others DESCALE(x, CB1)
// where DESCALE(x, n) rounds x / 2^n to nearest. The butterfly structure and
// the merged H/V scaling follow the engine's DCT description; the constant
// multiplies are left for synthesis to turn into shift-and-add networks.
// The outputs of both passes fit COEF_W = 14 bits for 8-bit level-shifted
// input samples (output is 8 x the orthonormal 2-D DCT after both passes).
//
// Interface: purely combinational, in[0..7] -> out[0..7].
module jpg_dct8
  import jpg_pkg::*;
#(
  parameter int IN_W  = COEF_W,
  parameter int OUT_W = COEF_W
) (
  input  logic                    dir,
  input  logic signed [IN_W-1:0]  in  [8],
  output logic signed [OUT_W-1:0] out [8]
);

  function automatic int descale(int x, int n);
    return (x + (1 << (n - 1))) >>> n;
  endfunction

  typedef logic signed [31:0] acc_t;

  acc_t t0, t1, t2, t3, t4, t5, t6, t7;
  acc_t t10, t11, t12, t13;
  acc_t z1, z2, z3, z4, z5;
  acc_t p4, p5, p6, p7, q1, q2, q3, q4, e1;
  acc_t o [8];
  int   cb;

  always_comb begin
    cb = dir ? CB1 : CB0;

    // first butterfly
    t0 = acc_t'(in[0]) + acc_t'(in[7]);  t7 = acc_t'(in[0]) - acc_t'(in[7]);
    t1 = acc_t'(in[1]) + acc_t'(in[6]);  t6 = acc_t'(in[1]) - acc_t'(in[6]);
    t2 = acc_t'(in[2]) + acc_t'(in[5]);  t5 = acc_t'(in[2]) - acc_t'(in[5]);
    t3 = acc_t'(in[3]) + acc_t'(in[4]);  t4 = acc_t'(in[3]) - acc_t'(in[4]);

    // even part
    t10 = t0 + t3;  t13 = t0 - t3;
    t11 = t1 + t2;  t12 = t1 - t2;
    o[0] = dir ? descale(t10 + t11, PASS1_BITS) : (t10 + t11) <<< PASS1_BITS;
    o[4] = dir ? descale(t10 - t11, PASS1_BITS) : (t10 - t11) <<< PASS1_BITS;
    e1   = (t12 + t13) * FIX_0_541196100;
    o[2] = descale(e1 + t13 * FIX_0_765366865, cb);
    o[6] = descale(e1 - t12 * FIX_1_847759065, cb);

    // odd part
    z1 = t4 + t7;  z2 = t5 + t6;  z3 = t4 + t6;  z4 = t5 + t7;
    z5 = (z3 + z4) * FIX_1_175875602;
    p4 = t4 * FIX_0_298631336;
    p5 = t5 * FIX_2_053119869;
    p6 = t6 * FIX_3_072711026;
    p7 = t7 * FIX_1_501321110;
    q1 = -(z1 * FIX_0_899976223);
    q2 = -(z2 * FIX_2_562915447);
    q3 = -(z3 * FIX_1_961570560) + z5;
    q4 = -(z4 * FIX_0_390180644) + z5;
    o[7] = descale(p4 + q1 + q3, cb);
    o[5] = descale(p5 + q2 + q4, cb);
    o[3] = descale(p6 + q2 + q3, cb);
    o[1] = descale(p7 + q1 + q4, cb);

    for (int k = 0; k < 8; k++) out[k] = OUT_W'(o[k]);
  end

endmodule
