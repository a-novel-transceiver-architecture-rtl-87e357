// Memory combiner (receive application layer).
// Whenever every lane FIFO holds at least one byte it pops one byte from each
// and writes the 32-bit word {lane3, lane2, lane1, lane0} to the receive RAM
// at the next address, one word per system clock. Lane i therefore fills
// bits 8*i+7 .. 8*i, the inverse of the memory splitter, and words are stored
// in the order they were sent. Because all four bytes of a word are taken
// together, skew between the lanes is absorbed by the FIFOs. The address
// wraps after NUM_WORDS words; packet_done pulses after each PKT_WORDS
// words and words counts all words written since reset. The document gives
// the byte-order rule; the all-lanes-ready rule and the counters are this
// implementation's. The byte join is pure wiring: ram_wdata is the
// concatenation of the lane FIFO outputs.
module memory_combiner
  import pe_pkg::*;
#(
  parameter int unsigned NUM_WORDS    = 4096,
  parameter int unsigned PKT_WORDS = pe_pkg::PACKET_WORDS,
  parameter int unsigned AW           = $clog2(NUM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LANES-1:0]  lane_empty,
  input  logic [BYTE_W-1:0] lane_data [LANES],
  output logic [LANES-1:0]  lane_pop,
  output logic              ram_we,
  output logic [AW-1:0]     ram_addr,
  output logic [WORD_W-1:0] ram_wdata,
  output logic [31:0]       words,
  output logic              packet_done
);
  localparam int unsigned PW = (PKT_WORDS > 1) ? $clog2(PKT_WORDS) : 1;

  logic          take;
  logic [PW-1:0] in_packet;

  assign take = (lane_empty == '0);

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      lane_pop[i]                    = take;
      ram_wdata[BYTE_W*i +: BYTE_W]  = lane_data[i];
    end
    ram_we = take;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ram_addr    <= '0;
      words       <= '0;
      in_packet   <= '0;
      packet_done <= 1'b0;
    end else begin
      packet_done <= 1'b0;
      if (take) begin
        ram_addr <= (ram_addr == AW'(NUM_WORDS - 1)) ? '0 : ram_addr + 1'b1;
        words    <= words + 1;
        if (in_packet == PW'(PKT_WORDS - 1)) begin
          in_packet   <= '0;
          packet_done <= 1'b1;
        end else begin
          in_packet <= in_packet + 1'b1;
        end
      end
    end
  end
endmodule
