// tct_fetch: fetch stage of the 4-stage (FE, DC, EX, WB) base processor,
// with the instruction-register hold used while the pipeline is stalled.
//
// FE stage: the fetch address pc is br_addr when a taken branch is reported
// (br_active) and nxt_pc otherwise. Program memory is read at word address
// pc >> 2 with a registered (synchronous) read, so the instruction word pout
// appears in the DC stage one clock later. The FE registers cur_pc (address
// of the instruction now in DC) and nxt_pc (= pc + 4) load only while the
// stage is not stalled; while stalled, pc = nxt_pc re-presents the same
// next address.
// DC stage: ir selects pout when the previous clock was not stalled
// (D(!stalled)) and ir_prev otherwise; ir_prev registers ir every clock, so
// the instruction that was in DC when a stall began stays there until the
// stall ends.
// Interface: br_active/br_addr come from the decoder, stalled from the
// pipeline control, both in the current clock. pm_we/pm_waddr/pm_wdata load
// program words. Outputs ir and cur_pc feed the decoder.
// The muxes, registers and the D(!stalled) selection follow the document's
// pipeline diagram; the memory size PM_SIZE, reset address 0 and the reset
// value of ir_prev (all zero) are this design's choices.
module tct_fetch #(
  parameter int PM_SIZE = 4096   // program memory words
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       br_active,
  input  logic [31:0]                br_addr,
  input  logic                       stalled,
  input  logic                       pm_we,
  input  logic [$clog2(PM_SIZE)-1:0] pm_waddr,
  input  logic [31:0]                pm_wdata,
  output logic [31:0]                pc,
  output logic [31:0]                cur_pc,
  output logic [31:0]                nxt_pc,
  output logic [31:0]                ir
);

  localparam int AW = $clog2(PM_SIZE);

  logic [31:0] pmem [PM_SIZE];
  logic [31:0] pout;
  logic [31:0] ir_prev;
  logic        not_stalled_d;   // D(!stalled)
  logic [AW-1:0] paddr;

  assign pc    = br_active ? br_addr : nxt_pc;
  assign paddr = pc[AW+1:2];

  always_ff @(posedge clk) begin
    if (pm_we) pmem[pm_waddr] <= pm_wdata;
    pout <= pmem[paddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_pc        <= '0;
      nxt_pc        <= '0;
      ir_prev       <= '0;
      not_stalled_d <= 1'b0;
    end else begin
      not_stalled_d <= !stalled;
      ir_prev       <= ir;
      if (!stalled) begin
        cur_pc <= pc;
        nxt_pc <= pc + 32'd4;
      end
    end
  end

  assign ir = not_stalled_d ? pout : ir_prev;

endmodule
