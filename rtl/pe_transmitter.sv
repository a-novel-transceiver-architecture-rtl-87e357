// Parallel Ethernet transmitter.
// Application layer: the transmit ROM and the memory splitter, which cuts
// every 32-bit word into four bytes, byte i for lane i. Transport layer: per
// lane a FIFO and a frame generator, which frames each PKT_WORDS-byte
// sub-packet with a header and sends it bit-serially at 8 bits per system
// clock. All four lanes carry their share of the same packet at the same
// time, so a packet of PKT_WORDS words leaves in about PKT_WORDS
// system cycles instead of 4 x PKT_WORDS on a single lane.
// start begins sending all MEM_WORDS words of the ROM (a whole number of
// packets); done pulses when the splitter has handed over the last word and
// frame_done[i] pulses at the end of every frame on lane i. hdr[i] is the
// header lane i puts in front of its sub-packets.
// The block structure is the document's; FIFO depth (one sub-packet) and
// ROM depth (four packets) are this implementation's choices.
module pe_transmitter
  import pe_pkg::*;
#(
  parameter int unsigned MEM_WORDS    = 4096,
  parameter int unsigned PKT_WORDS = pe_pkg::PACKET_WORDS,
  parameter int unsigned FIFO_DEPTH   = PKT_WORDS,
  parameter int unsigned AW           = $clog2(MEM_WORDS)
) (
  input  logic             clk_sys,
  input  logic             clk_ser,
  input  logic             rst_n,
  input  logic             start,
  input  pe_header_t       hdr [LANES],
  output logic             busy,
  output logic             done,
  output logic             stall,
  output logic [LANES-1:0] payload_active,
  output logic [LANES-1:0] frame_done,
  output logic [LANES-1:0] tx_serial
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  logic              rom_en;
  logic [AW-1:0]     rom_addr;
  logic [WORD_W-1:0] rom_data;
  logic [LANES-1:0]  afull, push, pop, empty, full, ovf;
  logic [BYTE_W-1:0] sdata [LANES];
  logic [BYTE_W-1:0] fdata [LANES];
  logic [FAW:0]      fcount [LANES];

  tx_rom #(.DEPTH(MEM_WORDS)) u_rom (
    .clk(clk_sys), .en(rom_en), .addr(rom_addr), .rdata(rom_data)
  );

  memory_splitter #(.NUM_WORDS(MEM_WORDS)) u_split (
    .clk(clk_sys), .rst_n, .start, .busy, .done, .stall,
    .rom_en, .rom_addr, .rom_data,
    .lane_afull(afull), .lane_push(push), .lane_data(sdata)
  );

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    byte_fifo #(.WIDTH(BYTE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clk_sys), .rst_n, .push(push[i]), .wdata(sdata[i]), .pop(pop[i]),
      .rdata(fdata[i]), .empty(empty[i]), .full(full[i]), .almost_full(afull[i]),
      .count(fcount[i]), .overflow(ovf[i])
    );

    frame_generator #(.PAYLOAD_BYTES(PKT_WORDS), .CW(FAW + 1)) u_gen (
      .clk_sys, .clk_ser, .rst_n, .enable(1'b1), .hdr(hdr[i]),
      .fifo_count(fcount[i]), .fifo_rdata(fdata[i]), .fifo_pop(pop[i]),
      .payload_active(payload_active[i]), .frame_done(frame_done[i]),
      .tx_serial(tx_serial[i])
    );
  end

  initial begin
    assert (MEM_WORDS % PKT_WORDS == 0)
      else $error("pe_transmitter: MEM_WORDS must be a whole number of packets");
    assert (FIFO_DEPTH >= PKT_WORDS)
      else $error("pe_transmitter: a lane FIFO must hold a whole sub-packet");
  end

  no_overflow: assert property (@(posedge clk_sys) disable iff (!rst_n) ovf == '0)
    else $error("pe_transmitter: lane FIFO overflow");
endmodule
