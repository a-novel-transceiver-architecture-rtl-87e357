// Parallel Ethernet receiver.
// Transport layer: per lane a frame checker, which turns the serial line back
// into bytes, accepts only frames whose header matches that port's default
// setting and strips the header, and a FIFO. Application layer: the memory
// combiner, which takes one byte from every lane, rebuilds the 32-bit words in
// the order they were sent and writes them into the receive RAM, whose read
// port is brought out. Lane skew is absorbed by the FIFOs because the
// combiner only proceeds when all four lanes have a byte.
// words counts words written, packet_done pulses per PKT_WORDS words,
// frame_ok/frame_drop pulse per accepted/rejected frame and overflow marks a
// payload byte lost to a full FIFO.
// The block structure is the document's; FIFO depth and RAM depth are this
// implementation's choices.
module pe_receiver
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
  input  logic [LANES-1:0]  rx_serial,
  input  pe_rx_cfg_t        cfg [LANES],
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [WORD_W-1:0] rd_data,
  output logic [31:0]       words,
  output logic              packet_done,
  output logic [LANES-1:0]  frame_ok,
  output logic [LANES-1:0]  frame_drop,
  output logic [LANES-1:0]  overflow
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  logic [LANES-1:0]  cvalid, empty, full, afull, pop;
  logic [BYTE_W-1:0] cdata [LANES];
  logic [BYTE_W-1:0] fdata [LANES];
  logic [FAW:0]      fcount [LANES];
  logic              ram_we;
  logic [AW-1:0]     ram_addr;
  logic [WORD_W-1:0] ram_wdata;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    frame_checker #(.PAYLOAD_BYTES(PKT_WORDS)) u_chk (
      .clk_ser, .clk_sys, .rst_n, .rx_serial(rx_serial[i]), .cfg(cfg[i]),
      .out_valid(cvalid[i]), .out_data(cdata[i]),
      .frame_ok(frame_ok[i]), .frame_drop(frame_drop[i])
    );

    byte_fifo #(.WIDTH(BYTE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clk_sys), .rst_n, .push(cvalid[i]), .wdata(cdata[i]), .pop(pop[i]),
      .rdata(fdata[i]), .empty(empty[i]), .full(full[i]), .almost_full(afull[i]),
      .count(fcount[i]), .overflow(overflow[i])
    );
  end

  memory_combiner #(.NUM_WORDS(MEM_WORDS), .PKT_WORDS(PKT_WORDS)) u_comb (
    .clk(clk_sys), .rst_n, .lane_empty(empty), .lane_data(fdata), .lane_pop(pop),
    .ram_we, .ram_addr, .ram_wdata, .words, .packet_done
  );

  rx_ram #(.DEPTH(MEM_WORDS)) u_ram (
    .clk(clk_sys), .we(ram_we), .waddr(ram_addr), .wdata(ram_wdata),
    .rd_en, .raddr(rd_addr), .rdata(rd_data)
  );
endmodule
