// tct_regfile: general-purpose register file of the base processor.
//
// GPR_COUNT registers of 32 bits (the processor is configurable between 32
// and 16 registers), two combinational read ports for the decoder and one
// write port for the write-back stage, written at the clock edge. A read of
// the register being written in the same clock returns the old value; the
// newer value reaches the decoder through the pipeline's forwarding paths.
// All registers reset to zero.
// The register counts follow the document; the port count, the reset and
// the read-during-write behaviour are this design's choices.
module tct_regfile #(
  parameter int GPR_COUNT = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(GPR_COUNT)-1:0] ra1,
  output logic [31:0]                  rd1,
  input  logic [$clog2(GPR_COUNT)-1:0] ra2,
  output logic [31:0]                  rd2,
  input  logic                         we,
  input  logic [$clog2(GPR_COUNT)-1:0] wa,
  input  logic [31:0]                  wd
);

  logic [31:0] gpr [GPR_COUNT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < GPR_COUNT; i++) gpr[i] <= '0;
    end else if (we) begin
      gpr[wa] <= wd;
    end
  end

  assign rd1 = gpr[ra1];
  assign rd2 = gpr[ra2];

  initial assert (GPR_COUNT == 16 || GPR_COUNT == 32)
    else $error("GPR_COUNT must be 16 or 32");

endmodule
