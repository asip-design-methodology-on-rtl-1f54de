// jpg_quant: quantizer of the JPEG encoder engine, about one clock per DCT
// coefficient.
//
// The quantizer walks a block's 64 coefficients in zig-zag order (rd_k) and
// divides each by eight times its quantization-table entry, rounding to
// nearest: with q = 4*divisor and qv = 8*divisor it computes
// qc = (|coef| + q) / qv and restores the sign.
//   state 0 (ST0): if r_coef = |coef| + q is below 8*qv the quotient is
//     0..7 and is found in the same clock by comparing r_coef with
//     qv, 2qv, ... 7qv. Nearly all coefficients take this path.
//   state 1 (ST1): otherwise a restoring long division runs, DIV_ITR
//     quotient bits per clock. The dividend is first shifted left past its
//     leading zeros so that only its significant bits are iterated.
// A zero-run counter counts zero AC coefficients; they produce no output.
// Each non-zero AC coefficient, the DC coefficient, and an end-of-block
// marker (when coefficient 63 is zero) are handed to the Huffman coder as a
// qevent_t {is_dc, eob, run, val} on a valid/ready handshake; the scan holds
// while ev_ready is low.
//
// Table port: qtab_we writes entry qtab_addr = {table, zig-zag index}; table 0
// is used for luma and 1 for chroma (tsel at start). Entries must be >= 1.
// Timing: with ev_ready held high a block takes 64 clocks plus, for each
// coefficient with a quotient of 8 or more, ceil(bits / DIV_ITR) clocks,
// where bits is the bit length of r_coef. `done` pulses once after the last
// coefficient.
// The two-state split, the comparison quotient for 0..7, the bit-serial
// division step and DIV_ITR = 3 follow the document; the leading-zero
// normalisation, table layout and handshake are this design's choices.
module jpg_quant
  import jpg_pkg::*;
#(
  parameter int DIV_ITR = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // quantization table write
  input  logic                     qtab_we,
  input  logic [6:0]               qtab_addr,
  input  logic [QTAB_W-1:0]        qtab_data,
  // control
  input  logic                     start,
  input  logic                     tsel,
  output logic                     busy,
  output logic                     done,
  // coefficient read (zig-zag position)
  output logic [5:0]               rd_k,
  input  logic signed [COEF_W-1:0] rd_coef,
  // events to the Huffman coder
  output logic                     ev_valid,
  input  logic                     ev_ready,
  output qevent_t                  ev
);

  localparam int NW = 15;   // dividend width
  localparam int RW = 13;   // remainder width

  typedef enum logic [1:0] {S_IDLE, S_ST0, S_ST1} state_e;

  state_e            state;
  logic [QTAB_W-1:0] qtab [128];
  logic              tsel_q;
  logic [5:0]        k;
  logic [5:0]        run;

  // long-division registers
  logic [4:0]        d_cnt;
  logic [NW-1:0]     d_nom;
  logic [RW-1:0]     d_rem;
  logic [15:0]       d_q;
  logic [11:0]       d_denom;
  logic              d_neg;

  always_ff @(posedge clk) begin
    if (qtab_we) qtab[qtab_addr] <= qtab_data;
  end

  assign rd_k = k;

  // ---------------------------------------------------------- state 0
  logic [QTAB_W-1:0] divisor;
  logic [11:0]       qv;
  logic [NW-1:0]     abs_coef, r_coef;
  logic [3:0]        qc_small;
  logic              big;
  logic [4:0]        lz;

  always_comb begin
    divisor  = qtab[{tsel_q, k}];
    qv       = 12'(divisor) << 3;
    abs_coef = rd_coef[COEF_W-1] ? NW'(-rd_coef) : NW'(rd_coef);
    r_coef   = abs_coef + (NW'(divisor) << 2);
    big      = 16'(r_coef) >= (16'(qv) << 3);
    qc_small = '0;
    for (int m = 1; m < 8; m++)
      if (16'(r_coef) >= 16'(qv) * 16'(m)) qc_small = 4'(m);
    lz = 5'd0;
    for (int i = 0; i < NW; i++)
      if (r_coef[i]) lz = 5'(NW - 1 - i);   // highest set bit wins
  end

  // ---------------------------------------------------------- state 1
  logic [4:0]    c_cnt [DIV_ITR+1];
  logic [NW-1:0] c_nom [DIV_ITR+1];
  logic [RW-1:0] c_rem [DIV_ITR+1];
  logic [15:0]   c_q   [DIV_ITR+1];

  always_comb begin
    c_cnt[0] = d_cnt; c_nom[0] = d_nom; c_rem[0] = d_rem; c_q[0] = d_q;
    for (int i = 0; i < DIV_ITR; i++) begin
      logic [RW-1:0] nrem;
      logic signed [RW:0] dif;
      logic qb, fin;
      nrem = {c_rem[i][RW-2:0], c_nom[i][NW-1]};
      dif  = $signed({1'b0, nrem}) - $signed({2'b0, d_denom});
      qb   = !dif[RW];
      fin  = (c_cnt[i] == 0);
      c_rem[i+1] = qb ? dif[RW-1:0] : nrem;
      c_nom[i+1] = c_nom[i] << 1;
      c_cnt[i+1] = fin ? 5'd0 : c_cnt[i] - 5'd1;
      c_q[i+1]   = fin ? c_q[i] : {c_q[i][14:0], qb};
    end
  end

  // ------------------------------------------------------ event output
  logic        res_ready;   // a result for coefficient k is available
  logic [15:0] res_mag;
  logic        res_neg;

  always_comb begin
    if (state == S_ST1) begin
      res_ready = (c_cnt[DIV_ITR] == 0);
      res_mag   = c_q[DIV_ITR];
      res_neg   = d_neg;
    end else begin
      res_ready = (state == S_ST0) && !big;
      res_mag   = 16'(qc_small);
      res_neg   = rd_coef[COEF_W-1];
    end
    ev.is_dc = (k == 6'd0);
    ev.eob   = (k == 6'd63) && (res_mag == 0);
    ev.run   = run;
    ev.val   = res_neg ? -QVAL_W'(res_mag) : QVAL_W'(res_mag);
    ev_valid = res_ready && (res_mag != 0 || k == 6'd0 || k == 6'd63);
  end

  logic advance;
  assign advance = res_ready && (!ev_valid || ev_ready);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      k       <= '0;
      run     <= '0;
      tsel_q  <= 1'b0;
      done    <= 1'b0;
      d_cnt   <= '0;
      d_nom   <= '0;
      d_rem   <= '0;
      d_q     <= '0;
      d_denom <= '0;
      d_neg   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state  <= S_ST0;
          k      <= '0;
          run    <= '0;
          tsel_q <= tsel;
        end
        default: begin
          if (state == S_ST0 && big) begin
            // set up the long division (jpg_q_setup_div)
            state   <= S_ST1;
            d_cnt   <= 5'(NW) - lz;
            d_nom   <= r_coef << lz;
            d_rem   <= '0;
            d_q     <= '0;
            d_denom <= qv;
            d_neg   <= rd_coef[COEF_W-1];
          end else if (state == S_ST1 && !res_ready) begin
            d_cnt <= c_cnt[DIV_ITR];
            d_nom <= c_nom[DIV_ITR];
            d_rem <= c_rem[DIV_ITR];
            d_q   <= c_q[DIV_ITR];
          end else if (advance) begin
            run <= ev_valid ? 6'd0 : run + 6'd1;
            k   <= k + 6'd1;
            if (k == 6'd63) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ST0;
            end
          end
        end
      endcase
    end
  end

  // an event is held stable until accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   ev_valid && !ev_ready |=> ev_valid && $stable(ev));

endmodule
