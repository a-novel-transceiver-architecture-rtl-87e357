// Parallel Ethernet shared definitions.
// Constants and types used by both ends of the four-lane parallel link:
// lane count and widths, the per-lane frame layout (preamble, start delimiter,
// header, payload, gap) and the header record that the transmitter inserts
// and the receiver compares. The 32-bit word, four 8-bit lanes, the 1024-word
// packet and the 125 MHz / 1 GHz clock pair (8 serial bits per system cycle)
// are the values the design is built around. The preamble/SFD bytes, the
// header field order and the gap length are this implementation's choices.
package pe_pkg;
  localparam int unsigned LANES        = 4;    // parallel Ethernet lanes
  localparam int unsigned BYTE_W       = 8;    // lane data width
  localparam int unsigned WORD_W       = 32;   // memory word width
  localparam int unsigned PACKET_WORDS = 1024; // words per packet
  localparam int unsigned SER_RATIO    = 8;    // serial bits per system clock

  localparam logic [7:0] PREAMBLE_BYTE = 8'h55;
  localparam logic [7:0] SFD_BYTE      = 8'hD5;
  localparam logic [7:0] IDLE_BYTE     = 8'h00;
  localparam int unsigned PREAMBLE_LEN = 7;    // preamble bytes before the SFD
  localparam int unsigned IFG_LEN      = 2;    // idle bytes after each frame

  // Header sent in front of every lane sub-packet, most significant byte first.
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] dst_ip;
    logic [15:0] port;
  } pe_header_t;

  localparam int unsigned HDR_BYTES = $bits(pe_header_t) / 8;

  // Default setting of a receiver port; a frame is accepted when the header's
  // destination MAC, destination IP and port all equal these.
  typedef struct packed {
    logic [47:0] mac;
    logic [31:0] ip;
    logic [15:0] port;
  } pe_rx_cfg_t;

  // Content of the transmit ROM: a multiplicative hash of the word address,
  // so that every byte lane carries varied, address-dependent data.
  function automatic logic [WORD_W-1:0] rom_pattern(input logic [31:0] addr);
    return addr * 32'h9E37_79B1 + 32'h7F4A_7C15;
  endfunction
endpackage
