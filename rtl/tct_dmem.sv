// tct_dmem: data memory of the base processor's EX stage.
//
// DM_SIZE words of 32 bits. The ALU supplies the word address daddr and
// write data din; a write (we) stores din at the clock edge, and a read
// returns the word at daddr on dout one clock later, so that it reaches the
// WB stage together with the EX-stage result register (ex_reg). A read of
// the word being written returns the old contents.
// The port names din, daddr and dout and the registered read (dout drawn in
// the WB stage) follow the document's pipeline diagram; the size, the word
// width and whole-word access are this design's choices, since the load and
// store instructions are not given.
module tct_dmem #(
  parameter int DM_SIZE = 4096
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(DM_SIZE)-1:0] daddr,
  input  logic [31:0]                din,
  output logic [31:0]                dout
);

  logic [31:0] mem [DM_SIZE];

  always_ff @(posedge clk) begin
    if (we) mem[daddr] <= din;
    dout <= mem[daddr];
  end

endmodule
