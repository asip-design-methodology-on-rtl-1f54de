// jpg_pkg: constants and types shared by the JPEG encoder ASIP engine.
//
// The DCT constants follow the accurate integer ("islow") 8-point DCT whose
// constant names the engine's DCT description uses (FIX_0_298631336 and so on):
// each is the named real number scaled by 2^CONST_BITS and rounded. CONST_BITS,
// PASS1_BITS and the fixed-point RGB->YCbCr weights are not fixed by the
// design description; the values here are the usual JPEG/JFIF ones.
// The zig-zag order is computed by a function rather than stored as a table.
package jpg_pkg;

  // ---------------------------------------------------------------- widths
  localparam int SAMPLE_W = 8;   // pixel component width
  localparam int COEF_W   = 14;  // DCT register width (64 x 14 bits)
  localparam int QVAL_W   = 12;  // quantized coefficient width (|q| <= 1024)
  localparam int QTAB_W   = 8;   // quantization table entry width

  // ---------------------------------------------------------- DCT scaling
  localparam int CONST_BITS = 13;
  localparam int PASS1_BITS = 2;                       // "PB1"
  localparam int CB0 = CONST_BITS - PASS1_BITS;        // horizontal descale
  localparam int CB1 = CONST_BITS + PASS1_BITS;        // vertical descale

  function automatic int fix(real x);
    return int'(x * real'(1 << CONST_BITS));  // int'() rounds to nearest
  endfunction

  localparam int FIX_0_298631336 = fix(0.298631336);
  localparam int FIX_0_390180644 = fix(0.390180644);
  localparam int FIX_0_541196100 = fix(0.541196100);
  localparam int FIX_0_765366865 = fix(0.765366865);
  localparam int FIX_0_899976223 = fix(0.899976223);
  localparam int FIX_1_175875602 = fix(1.175875602);
  localparam int FIX_1_501321110 = fix(1.501321110);
  localparam int FIX_1_847759065 = fix(1.847759065);
  localparam int FIX_1_961570560 = fix(1.961570560);
  localparam int FIX_2_053119869 = fix(2.053119869);
  localparam int FIX_2_562915447 = fix(2.562915447);
  localparam int FIX_3_072711026 = fix(3.072711026);

  // ------------------------------------------------ RGB -> YCbCr weights
  localparam int CC_BITS = 16;
  function automatic int ccfix(real x);
    return int'(x * real'(1 << CC_BITS));
  endfunction
  localparam int CC_Y_R  = ccfix(0.29900);
  localparam int CC_Y_G  = ccfix(0.58700);
  localparam int CC_Y_B  = ccfix(0.11400);
  localparam int CC_CB_R = ccfix(0.16874);
  localparam int CC_CB_G = ccfix(0.33126);
  localparam int CC_CR_G = ccfix(0.41869);
  localparam int CC_CR_B = ccfix(0.08131);
  localparam int CC_HALF = 1 << (CC_BITS - 1);

  // -------------------------------------------------------------- zig-zag
  // zigzag(k) = natural (row*8+col) index of the k-th coefficient in
  // zig-zag scan order. Diagonal d = row+col; odd diagonals run downwards
  // (row increasing), even diagonals upwards.
  function automatic logic [5:0] zigzag(logic [5:0] k);
    logic [5:0] n;
    n = 0;
    for (int d = 0; d < 15; d++) begin
      for (int i = 0; i < 8; i++) begin
        int r, c;
        r = (d % 2 == 1) ? i : d - i;
        c = d - r;
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin
          if (n == k) return 6'(r * 8 + c);
          n++;
        end
      end
    end
    return '0;
  endfunction

  // ----------------------------------------------- engine command opcodes
  // Custom-instruction operations accepted by the engine's command port.
  typedef enum logic [2:0] {
    CMD_COLOR_MCU = 3'd0,  // convert 256 pixels (one 16x16 MCU) from the in-FIFO
    CMD_ENCODE    = 3'd1,  // DCT + quantize + Huffman-code block arg[2:0] (0-3 Y, 4 Cb, 5 Cr)
    CMD_FLUSH     = 3'd2,  // pad the bit buffer with 1s to a byte boundary
    CMD_SET_QTAB  = 3'd3,  // write a quantization table entry
    CMD_SET_HTAB  = 3'd4,  // write a Huffman code table entry
    CMD_RESET_DC  = 3'd5   // clear the DC predictors (start of scan)
  } jpg_cmd_e;

  // One coefficient event from the quantizer to the Huffman coder.
  typedef struct packed {
    logic                     is_dc;  // DC coefficient (k == 0)
    logic                     eob;    // end of block: all remaining ACs zero
    logic [5:0]               run;    // zeros preceding this AC coefficient
    logic signed [QVAL_W-1:0] val;    // quantized value
  } qevent_t;

endpackage
