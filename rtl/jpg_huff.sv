// jpg_huff: Huffman coder and bit packer of the JPEG encoder engine, about
// one clock per code word, with byte-wide output.
//
// Each quantizer event becomes one JPEG baseline code word per clock:
//   DC:  diff = val - previous DC of the same component; symbol = size(diff)
//   AC:  symbol = {run, size(val)}; a run of 16 or more zeros first emits
//        one ZRL code (symbol 0xF0) per 16 zeros, one per clock, holding the
//        event (ev_ready low) meanwhile
//   EOB: symbol 0x00 of the AC table
// size(v) is the bit length of |v|; the size extra bits are v for v > 0 and
// v - 1 for v < 0 (low size bits). The code of a symbol is looked up in a
// writable table (code length 1..16 and code bits), so any Huffman table,
// such as the standard ones, can be loaded: 2 DC tables of 16 symbols and 2
// AC tables of 256 symbols, table 0 for luma and 1 for chroma.
//
// The bit packer appends code word and extra bits, up to 27 bits, to a 64-bit
// buffer and emits its oldest byte whenever eight bits are there and the
// output is ready; after a 0xFF byte it emits a stuffed 0x00. A new code word
// is taken only while the buffer holds 32 bits or fewer, so a slow output
// stalls the quantizer through ev_ready. `flush` pads the buffer with 1 bits
// to a byte boundary; `drained` is high once fewer than eight bits remain
// and no stuffed byte is pending.
//
// Table port: htab_we with htab_addr = {ac, chroma, symbol[7:0]} (DC tables
// use symbols 0..15), htab_len and htab_code (right-aligned).
// The document fixes the function (bit-packing FSM for variable-length codes,
// byte-wide FIFO output); the table layout, buffer size, stall threshold and
// handshakes are this design's choices.
module jpg_huff
  import jpg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // code table write
  input  logic        htab_we,
  input  logic [9:0]  htab_addr,
  input  logic [4:0]  htab_len,
  input  logic [15:0] htab_code,
  // control
  input  logic        dc_clear,    // reset the three DC predictors
  input  logic [1:0]  comp,        // 0 = Y, 1 = Cb, 2 = Cr
  input  logic        flush,       // pad to a byte boundary (no event that clock)
  output logic        drained,
  // events from the quantizer
  input  logic        ev_valid,
  output logic        ev_ready,
  input  qevent_t     ev,
  // byte output
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  // statistics for observation
  output logic        zrl_emit,    // a ZRL code is being emitted this clock
  output logic        stuff_emit   // a stuffed 0x00 is being emitted this clock
);

  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;
  } hcode_t;

  hcode_t ac_tab [512];
  hcode_t dc_tab [32];

  always_ff @(posedge clk) begin
    if (htab_we) begin
      if (htab_addr[9]) ac_tab[htab_addr[8:0]] <= '{htab_len, htab_code};
      else              dc_tab[{htab_addr[8], htab_addr[3:0]}] <= '{htab_len, htab_code};
    end
  end

  logic signed [QVAL_W-1:0] last_dc [3];
  logic [5:0]               zrl_done;   // ZRLs already emitted for this event
  logic [63:0]              acc;
  logic [6:0]               fill;
  logic                     stuff_pend;

  function automatic logic [3:0] bitsize(logic signed [QVAL_W:0] v);
    logic [QVAL_W:0] a;
    logic [3:0]      s;
    a = v[QVAL_W] ? -v : v;
    s = '0;
    for (int i = 0; i <= QVAL_W; i++) if (a[i]) s = 4'(i + 1);
    return s;
  endfunction

  // ----------------------------------------------------- code word build
  logic                     chroma;
  logic signed [QVAL_W:0]   v;
  logic [3:0]               s;
  logic [5:0]               run_eff;
  logic                     is_zrl;
  hcode_t                   hc;
  logic [5:0]               n_bits;
  logic [26:0]              word;
  logic [15:0]              vbits;
  logic                     take;

  always_comb begin
    chroma  = (comp != 2'd0);
    run_eff = ev.run - (zrl_done << 4);
    is_zrl  = !ev.is_dc && !ev.eob && (run_eff >= 6'd16);
    if (ev.is_dc) v = (QVAL_W+1)'(ev.val) - (QVAL_W+1)'(last_dc[comp]);
    else          v = (QVAL_W+1)'(ev.val);
    s = (ev.eob || is_zrl) ? 4'd0 : bitsize(v);
    if (ev.is_dc)     hc = dc_tab[{chroma, s}];
    else if (ev.eob)  hc = ac_tab[{chroma, 8'h00}];
    else if (is_zrl)  hc = ac_tab[{chroma, 8'hF0}];
    else              hc = ac_tab[{chroma, run_eff[3:0], s}];
    vbits  = 16'(v[QVAL_W] ? v - (QVAL_W+1)'(1) : v) & ((16'd1 << s) - 16'd1);
    n_bits = 6'(hc.len) + 6'(s);
    word   = (27'(hc.code) << s) | 27'(vbits);
    take   = ev_valid && (fill <= 7'd32) && !flush;
    ev_ready = take && !is_zrl;
    zrl_emit = take && is_zrl;
  end

  // ------------------------------------------------------- byte output
  logic       emit;
  logic [7:0] top_byte;
  always_comb begin
    top_byte   = 8'(acc >> (fill - 7'd8));
    out_valid  = stuff_pend || (fill >= 7'd8);
    out_data   = stuff_pend ? 8'h00 : top_byte;
    emit       = out_valid && out_ready;
    stuff_emit = stuff_pend && out_ready;
    drained    = (fill < 7'd8) && !stuff_pend;
  end

  logic [5:0]  add_n;
  logic [26:0] add_w, add_mask;
  logic [2:0]  pad_n;
  assign add_mask = 27'((28'd1 << add_n) - 28'd1);
  assign pad_n    = 3'd0 - fill[2:0];
  always_comb begin
    if (take) begin
      add_n = n_bits;
      add_w = word;
    end else if (flush) begin
      add_n = {3'd0, pad_n};   // bits to the next byte boundary
      add_w = '1;
    end else begin
      add_n = '0;
      add_w = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      fill       <= '0;
      stuff_pend <= 1'b0;
      zrl_done   <= '0;
      for (int i = 0; i < 3; i++) last_dc[i] <= '0;
    end else begin
      acc  <= (acc << add_n) | 64'(add_w & add_mask);
      fill <= fill + 7'(add_n) - ((emit && !stuff_pend) ? 7'd8 : 7'd0);
      if (stuff_pend) begin
        if (out_ready) stuff_pend <= 1'b0;
      end else if (emit && top_byte == 8'hFF) begin
        stuff_pend <= 1'b1;
      end
      if (zrl_emit)      zrl_done <= zrl_done + 6'd1;
      else if (ev_ready) zrl_done <= '0;
      if (ev_ready && ev.is_dc) last_dc[comp] <= ev.val;
      if (dc_clear) for (int i = 0; i < 3; i++) last_dc[i] <= '0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) fill <= 7'd64);

endmodule
