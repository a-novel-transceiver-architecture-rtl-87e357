// Transmit on-chip memory (ROM).
// Holds the data to be sent: DEPTH words of 32 bits, read by the memory
// splitter one word per system clock. The read is synchronous: the word at
// addr appears on rdata one cycle after en is high, as in an FPGA block RAM.
// The document gives the 32-bit width and that the ROM is the transmit
// storage; its depth and contents are not given. Here it holds four packets
// and is filled at start-up with pe_pkg::rom_pattern(address).
module tx_rom
  import pe_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic [AW-1:0]     addr,
  output logic [WORD_W-1:0] rdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = rom_pattern(32'(i));
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr];
  end
endmodule
