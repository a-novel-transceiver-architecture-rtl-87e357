// Receive on-chip memory (RAM).
// DEPTH words of 32 bits. The memory combiner writes reassembled words
// through the write port; the user reads them back through a separate
// synchronous read port (data one cycle after rd_en). Width follows the
// document; the depth (same as the transmit ROM) and the simple dual-port
// organisation are this implementation's choices.
module rx_ram
  import pe_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic              rd_en,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end
endmodule
