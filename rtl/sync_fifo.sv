// sync_fifo: single-clock FIFO with valid/ready on both sides.
//
// Used for the engine's pixel in-FIFO and byte out-FIFO. DEPTH entries of
// WIDTH bits are held in a circular buffer addressed by read and write
// pointers one bit wider than the address, so that full and empty are told
// apart by that extra bit. A write (in_valid && in_ready) and a read
// (out_valid && out_ready) may happen in the same clock; out_data is the
// oldest entry, read combinationally. `count` is the number of entries held.
// The document names the in-FIFO, out-FIFO and FIFO FSM without giving their
// depth or protocol; DEPTH = 16 and the handshake are this design's choices.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             wr, rd;

  assign count     = wp - rp;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp[AW-1:0]];
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr) wp <= wp + 1'b1;
      if (rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wp[AW-1:0]] <= in_data;
  end

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

endmodule
