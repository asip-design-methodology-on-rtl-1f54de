// jpeg_asip: JPEG baseline encoder engine attached to a processor as custom
// instructions, with a pixel in-FIFO and a byte out-FIFO.
//
// The processor issues one command per custom instruction on a valid/ready
// port; cmd_ready stays low while a command runs, which is the stall the
// processor pipeline sees. Commands (jpg_pkg::jpg_cmd_e):
//   CMD_COLOR_MCU  pop 256 RGB pixels (one 16x16 MCU, raster order) from the
//                  in-FIFO through the colour converter, 1 pixel per clock
//   CMD_ENCODE     arg[2:0] = block (0-3 Y, 4 Cb, 5 Cr): 2-D DCT in 16
//                  clocks, then quantization (table 0 for Y, 1 for chroma)
//                  and Huffman coding at about one clock per coefficient
//   CMD_FLUSH      pad the bit stream with 1s to a byte boundary and wait
//                  until every whole byte has gone to the out-FIFO
//   CMD_SET_QTAB   arg[14:8] = {table, zig-zag index}, arg[7:0] = divisor
//   CMD_SET_HTAB   arg[30:21] = {ac, chroma, symbol}, arg[20:16] = length,
//                  arg[15:0] = code
//   CMD_RESET_DC   clear the DC predictors (start of a scan)
// Data path: in-FIFO -> jpg_color_conv (YCbCr block memory) -> jpg_dct_engine
// (64 x 14-bit array) -> jpg_quant (zig-zag scan, run length) -> jpg_huff
// (bit packer, byte stuffing) -> out-FIFO. The Huffman coder drains into the
// out-FIFO on its own, so bytes keep flowing after a command has finished;
// a full out-FIFO backs up through the Huffman coder into the quantizer.
//
// Base-processor parts: the fetch stage (tct_fetch), register file
// (tct_regfile) and data memory (tct_dmem) are included. The decoder, ALU,
// pipeline control and write-back are not, because the instruction set is
// not given; their connections are brought out as ports. The decoder would
// drive the command port, the branch inputs and the register-file and
// data-memory ports. The fetch stage stalls while a custom instruction
// waits for the engine (cmd_valid && !cmd_ready) or pipe_stall is high.
//
// The engine's parts, their rates and the FIFO interface follow the
// document. The command set, its encoding and the one-block-per-command
// sequencing are this design's choices. Output is the entropy-coded segment
// only: JPEG headers and markers are left to software.
module jpeg_asip
  import jpg_pkg::*;
#(
  parameter int IN_FIFO_DEPTH  = 16,
  parameter int OUT_FIFO_DEPTH = 16,
  parameter int DIV_ITR        = 3,
  parameter int PM_SIZE        = 4096,
  parameter int GPR_COUNT      = 32,
  parameter int DM_SIZE        = 4096
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // base-processor fetch stage (decoder and pipeline control are external)
  input  logic                  br_active,
  input  logic [31:0]           br_addr,
  input  logic                  pipe_stall,     // stall from the rest of the pipeline
  input  logic                  pm_we,
  input  logic [$clog2(PM_SIZE)-1:0] pm_waddr,
  input  logic [31:0]           pm_wdata,
  output logic [31:0]           fe_pc,
  output logic [31:0]           dc_pc,          // cur_pc: address of ir
  output logic [31:0]           dc_ir,
  output logic                  fe_stalled,
  // register file (read by the decoder, written by write-back)
  input  logic [$clog2(GPR_COUNT)-1:0] rf_ra1,
  output logic [31:0]           rf_rd1,
  input  logic [$clog2(GPR_COUNT)-1:0] rf_ra2,
  output logic [31:0]           rf_rd2,
  input  logic                  rf_we,
  input  logic [$clog2(GPR_COUNT)-1:0] rf_wa,
  input  logic [31:0]           rf_wd,
  // data memory (addressed by the external ALU)
  input  logic                  dm_we,
  input  logic [$clog2(DM_SIZE)-1:0] dm_daddr,
  input  logic [31:0]           dm_din,
  output logic [31:0]           dm_dout,
  // custom-instruction command port
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  jpg_cmd_e              cmd_op,
  input  logic [31:0]           cmd_arg,
  // pixel in-FIFO (write side)
  input  logic                  pix_in_valid,
  output logic                  pix_in_ready,
  input  logic [3*SAMPLE_W-1:0] pix_in_data,    // {R, G, B}
  // byte out-FIFO (read side)
  output logic                  byte_out_valid,
  input  logic                  byte_out_ready,
  output logic [7:0]            byte_out_data
);

  // ------------------------------------------------ base processor parts
  // A custom instruction waiting for the engine stalls the pipeline
  // (the engine's pipe control).
  logic [31:0] fe_nxt_pc;
  assign fe_stalled = pipe_stall || (cmd_valid && !cmd_ready);

  tct_fetch #(.PM_SIZE(PM_SIZE)) u_fetch (
    .clk, .rst_n, .br_active, .br_addr, .stalled(fe_stalled),
    .pm_we, .pm_waddr, .pm_wdata,
    .pc(fe_pc), .cur_pc(dc_pc), .nxt_pc(fe_nxt_pc), .ir(dc_ir)
  );

  tct_regfile #(.GPR_COUNT(GPR_COUNT)) u_regfile (
    .clk, .rst_n, .ra1(rf_ra1), .rd1(rf_rd1), .ra2(rf_ra2), .rd2(rf_rd2),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );

  tct_dmem #(.DM_SIZE(DM_SIZE)) u_dmem (
    .clk, .we(dm_we), .daddr(dm_daddr), .din(dm_din), .dout(dm_dout)
  );

  typedef enum logic [2:0] {E_IDLE, E_COLOR, E_DCT, E_QUANT, E_FLUSH, E_DRAIN} estate_e;

  estate_e    state;
  logic [2:0] blk;

  // ------------------------------------------------------------ in-FIFO
  logic                  if_valid;
  logic [3*SAMPLE_W-1:0] if_data;
  logic                  if_pop;

  sync_fifo #(.WIDTH(3*SAMPLE_W), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid(pix_in_valid), .in_ready(pix_in_ready), .in_data(pix_in_data),
    .out_valid(if_valid), .out_ready(if_pop), .out_data(if_data),
    .count()
  );

  assign if_pop = (state == E_COLOR);

  // ------------------------------------------------- colour conversion
  logic                       mcu_done;
  logic [2:0]                 row_idx;
  logic signed [SAMPLE_W-1:0] row_data [8];

  jpg_color_conv u_color (
    .clk, .rst_n,
    .pix_valid(if_valid && if_pop), .pix_rgb(if_data), .mcu_done,
    .rd_blk(blk), .rd_row(row_idx), .rd_data(row_data)
  );

  // ---------------------------------------------------------------- DCT
  logic                     dct_start, dct_busy, dct_done;
  logic [5:0]               q_k;
  logic signed [COEF_W-1:0] q_coef;

  jpg_dct_engine u_dct (
    .clk, .rst_n,
    .start(dct_start), .busy(dct_busy), .done(dct_done),
    .row_idx, .row_in(row_data),
    .rd_k(q_k), .rd_coef(q_coef)
  );

  // ------------------------------------------------------- quantization
  logic    q_start, q_busy, q_done;
  logic    ev_valid, ev_ready;
  qevent_t ev;
  logic    is_cmd;
  assign is_cmd = cmd_valid && cmd_ready;

  jpg_quant #(.DIV_ITR(DIV_ITR)) u_quant (
    .clk, .rst_n,
    .qtab_we(is_cmd && cmd_op == CMD_SET_QTAB),
    .qtab_addr(cmd_arg[14:8]), .qtab_data(cmd_arg[7:0]),
    .start(q_start), .tsel(blk >= 3'd4), .busy(q_busy), .done(q_done),
    .rd_k(q_k), .rd_coef(q_coef),
    .ev_valid, .ev_ready, .ev
  );

  // ------------------------------------------------------------ Huffman
  logic       h_out_valid, h_out_ready;
  logic [7:0] h_out_data;
  logic       h_drained, h_flush;
  logic [1:0] comp;

  assign comp = (blk < 3'd4) ? 2'd0 : 2'(blk - 3'd3);

  jpg_huff u_huff (
    .clk, .rst_n,
    .htab_we(is_cmd && cmd_op == CMD_SET_HTAB),
    .htab_addr(cmd_arg[30:21]), .htab_len(cmd_arg[20:16]), .htab_code(cmd_arg[15:0]),
    .dc_clear(is_cmd && cmd_op == CMD_RESET_DC),
    .comp, .flush(h_flush), .drained(h_drained),
    .ev_valid, .ev_ready, .ev,
    .out_valid(h_out_valid), .out_ready(h_out_ready), .out_data(h_out_data),
    .zrl_emit(), .stuff_emit()
  );

  // ----------------------------------------------------------- out-FIFO
  sync_fifo #(.WIDTH(8), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid(h_out_valid), .in_ready(h_out_ready), .in_data(h_out_data),
    .out_valid(byte_out_valid), .out_ready(byte_out_ready), .out_data(byte_out_data),
    .count()
  );

  // ------------------------------------------------ command sequencer
  assign cmd_ready = (state == E_IDLE);
  assign dct_start = (state == E_DCT) && !dct_busy && !dct_done;
  assign h_flush   = (state == E_FLUSH);

  logic dct_started;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= E_IDLE;
      blk         <= '0;
      q_start     <= 1'b0;
      dct_started <= 1'b0;
    end else begin
      q_start <= 1'b0;
      case (state)
        E_IDLE: if (cmd_valid) begin
          case (cmd_op)
            CMD_COLOR_MCU: state <= E_COLOR;
            CMD_ENCODE: begin
              state       <= E_DCT;
              blk         <= cmd_arg[2:0];
              dct_started <= 1'b0;
            end
            CMD_FLUSH: state <= E_FLUSH;
            default: ;
          endcase
        end
        E_COLOR: if (mcu_done) state <= E_IDLE;
        E_DCT: begin
          if (dct_start) dct_started <= 1'b1;
          if (dct_done && dct_started) begin
            state   <= E_QUANT;
            q_start <= 1'b1;
          end
        end
        E_QUANT: if (q_done) state <= E_IDLE;
        E_FLUSH: state <= E_DRAIN;
        E_DRAIN: if (h_drained) state <= E_IDLE;
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
