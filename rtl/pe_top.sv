// Four-lane parallel Ethernet transceiver: transmitter and receiver.
// A 32-bit word stream is split byte-wise over four independent 1 Gb/s serial
// lanes and rebuilt at the far end, giving four times the rate of one lane.
// The transmitter reads its ROM, frames each lane's share of a packet with a
// header and serialises it; the receiver checks each lane's header against
// that port's default setting, strips it, and reassembles the words into its
// RAM in the original order. The four lanes leave on tx_serial and enter on
// rx_serial, so the link is closed outside the design: lane i of the
// transmitter is wired point-to-point to lane i of the receiver (a board
// loopback in the simplest case).
// Clocks: clk_sys 125 MHz for all parallel logic, clk_ser 1 GHz for the
// serial bits, edge-aligned from one PLL (8 serial cycles per system cycle).
// rst_n is an asynchronous, active-low reset for both domains.
module pe_top
  import pe_pkg::*;
#(
  parameter int unsigned MEM_WORDS    = 4096,
  parameter int unsigned PKT_WORDS = pe_pkg::PACKET_WORDS,
  parameter int unsigned FIFO_DEPTH   = PKT_WORDS,
  parameter int unsigned AW           = $clog2(MEM_WORDS)
) (
  input  logic              clk_sys,
  input  logic              clk_ser,
  input  logic              rst_n,
  // transmitter
  input  logic              tx_start,
  input  pe_header_t        tx_hdr [LANES],
  output logic              tx_busy,
  output logic              tx_done,
  output logic              tx_stall,
  output logic [LANES-1:0]  tx_payload_active,
  output logic [LANES-1:0]  tx_frame_done,
  output logic [LANES-1:0]  tx_serial,
  // receiver
  input  logic [LANES-1:0]  rx_serial,
  input  pe_rx_cfg_t        rx_cfg [LANES],
  input  logic              rx_rd_en,
  input  logic [AW-1:0]     rx_rd_addr,
  output logic [WORD_W-1:0] rx_rd_data,
  output logic [31:0]       rx_words,
  output logic              rx_packet_done,
  output logic [LANES-1:0]  rx_frame_ok,
  output logic [LANES-1:0]  rx_frame_drop,
  output logic [LANES-1:0]  rx_overflow
);
  pe_transmitter #(
    .MEM_WORDS(MEM_WORDS), .PKT_WORDS(PKT_WORDS), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_tx (
    .clk_sys, .clk_ser, .rst_n, .start(tx_start), .hdr(tx_hdr),
    .busy(tx_busy), .done(tx_done), .stall(tx_stall),
    .payload_active(tx_payload_active), .frame_done(tx_frame_done),
    .tx_serial
  );

  pe_receiver #(
    .MEM_WORDS(MEM_WORDS), .PKT_WORDS(PKT_WORDS), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_rx (
    .clk_sys, .clk_ser, .rst_n, .rx_serial, .cfg(rx_cfg),
    .rd_en(rx_rd_en), .rd_addr(rx_rd_addr), .rd_data(rx_rd_data),
    .words(rx_words), .packet_done(rx_packet_done),
    .frame_ok(rx_frame_ok), .frame_drop(rx_frame_drop), .overflow(rx_overflow)
  );
endmodule
