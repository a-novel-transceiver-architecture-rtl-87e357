// Memory splitter (transmit application layer).
// After a start pulse it reads NUM_WORDS consecutive 32-bit words from the
// transmit ROM, one per system clock, and hands byte i of each word
// (bits 8*i+7 .. 8*i) to lane i: the first byte goes to Ethernet system 1,
// the second to system 2, and so on, so all lanes move the same amount of data
// in lockstep. The ROM has one cycle of read latency, so a word read in cycle
// t is pushed into the four lane FIFOs in cycle t+1. A read is issued only
// when no lane FIFO is almost full; otherwise the splitter stalls (stall is
// high for that cycle) until every generator has drained its FIFO. done
// pulses with the push of the last word. The byte-to-lane split is the
// document's; the lane order within the word, the start/done handshake and
// the stall rule are this implementation's. The byte split itself is pure
// wiring: lane_data[i] is a slice of rom_data.
module memory_splitter
  import pe_pkg::*;
#(
  parameter int unsigned NUM_WORDS = 4096,
  parameter int unsigned AW        = $clog2(NUM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              stall,
  // ROM read port
  output logic              rom_en,
  output logic [AW-1:0]     rom_addr,
  input  logic [WORD_W-1:0] rom_data,
  // lane FIFO write ports
  input  logic [LANES-1:0]  lane_afull,
  output logic [LANES-1:0]  lane_push,
  output logic [BYTE_W-1:0] lane_data [LANES]
);
  logic rd_q, last_q;
  logic last_rd;

  assign rom_en  = busy && (lane_afull == '0);
  assign stall   = busy && (lane_afull != '0);
  assign last_rd = rom_en && (rom_addr == AW'(NUM_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      rom_addr <= '0;
      rd_q     <= 1'b0;
      last_q   <= 1'b0;
      done     <= 1'b0;
    end else begin
      rd_q   <= rom_en;
      last_q <= last_rd;
      done   <= 1'b0;
      if (!busy && start) begin
        busy     <= 1'b1;
        rom_addr <= '0;
      end else if (rom_en) begin
        rom_addr <= rom_addr + 1'b1;
        if (last_rd) busy <= 1'b0;
      end
      if (last_q) done <= 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      lane_push[i] = rd_q;
      lane_data[i] = rom_data[BYTE_W*i +: BYTE_W];
    end
  end
endmodule
