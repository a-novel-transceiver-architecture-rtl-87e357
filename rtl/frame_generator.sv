// Frame generator (transmit transport layer, one per lane).
// System side (clk_sys, 125 MHz): once the lane FIFO holds a whole sub-packet
// of PAYLOAD_BYTES bytes, and enable is high, it sends one frame, one byte per
// system clock:
//   PREAMBLE_LEN x 0x55 | 0xD5 | header (HDR_BYTES, MSB first) |
//   PAYLOAD_BYTES from the FIFO | IFG_LEN x 0x00
// and 0x00 while idle. The header (MAC addresses, IP address, port) is
// sampled from hdr at the start of each frame. Waiting for a whole
// sub-packet means the serial line never runs dry inside a frame.
// payload_active is high in the cycles whose byte is payload, and
// frame_done pulses with the last payload byte.
// Network side (clk_ser, 1 GHz = 8 x clk_sys, from the same PLL): an 8-bit
// shift register sends the byte least significant bit first, one bit per
// serial clock, giving 1 Gb/s. The system side flips a toggle every system
// cycle; the serial side synchronises it and loads the shift register on
// each flip, so it picks up every byte exactly once, 2-3 serial cycles after
// the byte register changed and well before it changes again.
// The two clocks, the 8-bit parallel input, the 1-bit output and the header
// contents follow the document; the frame layout, bit order, the
// store-and-forward start rule and the clock-crossing scheme are this
// implementation's.
module frame_generator
  import pe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = pe_pkg::PACKET_WORDS,
  parameter int unsigned CW            = $clog2(PAYLOAD_BYTES) + 1
) (
  input  logic              clk_sys,
  input  logic              clk_ser,
  input  logic              rst_n,
  input  logic              enable,
  input  pe_header_t        hdr,
  // lane FIFO read side (first word fall through)
  input  logic [CW-1:0]     fifo_count,
  input  logic [BYTE_W-1:0] fifo_rdata,
  output logic              fifo_pop,
  // status
  output logic              payload_active,
  output logic              frame_done,
  // network side
  output logic              tx_serial
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_SFD, S_HDR, S_PAY, S_IFG} state_t;

  localparam int unsigned IW = $clog2(PAYLOAD_BYTES + PREAMBLE_LEN + HDR_BYTES + IFG_LEN);

  state_t                   state, state_n;
  logic [IW-1:0]            idx, idx_n;
  pe_header_t               hdr_q;
  logic [BYTE_W-1:0]        byte_n, byte_q;
  logic                     sys_tgl;
  logic                     pay_n, done_n;

  // ---------------- system side ----------------
  always_comb begin
    state_n  = state;
    idx_n    = idx + 1'b1;
    byte_n   = IDLE_BYTE;
    fifo_pop = 1'b0;
    pay_n    = 1'b0;
    done_n   = 1'b0;
    unique case (state)
      S_IDLE: begin
        idx_n = '0;
        if (enable && fifo_count >= CW'(PAYLOAD_BYTES)) begin
          state_n = S_PRE;
        end
      end
      S_PRE: begin
        byte_n = PREAMBLE_BYTE;
        if (idx == IW'(PREAMBLE_LEN - 1)) state_n = S_SFD;
      end
      S_SFD: begin
        byte_n  = SFD_BYTE;
        idx_n   = '0;
        state_n = S_HDR;
      end
      S_HDR: begin
        byte_n = hdr_q[BYTE_W*(HDR_BYTES - 1 - int'(idx)) +: BYTE_W];
        if (idx == IW'(HDR_BYTES - 1)) begin
          idx_n   = '0;
          state_n = S_PAY;
        end
      end
      S_PAY: begin
        byte_n   = fifo_rdata;
        fifo_pop = 1'b1;
        pay_n    = 1'b1;
        if (idx == IW'(PAYLOAD_BYTES - 1)) begin
          idx_n   = '0;
          done_n  = 1'b1;
          state_n = S_IFG;
        end
      end
      S_IFG: begin
        if (idx == IW'(IFG_LEN - 1)) state_n = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      idx            <= '0;
      hdr_q          <= '0;
      byte_q         <= IDLE_BYTE;
      sys_tgl        <= 1'b0;
      payload_active <= 1'b0;
      frame_done     <= 1'b0;
    end else begin
      state          <= state_n;
      idx            <= idx_n;
      byte_q         <= byte_n;
      sys_tgl        <= ~sys_tgl;
      payload_active <= pay_n;
      frame_done     <= done_n;
      if (state == S_IDLE) hdr_q <= hdr;
    end
  end

  // one byte per system cycle must fill exactly one system cycle of serial bits
  initial assert (SER_RATIO == BYTE_W)
    else $error("frame_generator: clk_ser must run at BYTE_W x clk_sys");

  // ---------------- serial side ----------------
  logic [2:0]        tgl_sync;
  logic [BYTE_W-2:0] shreg;
  logic              load;

  assign load = tgl_sync[2] ^ tgl_sync[1];

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      tgl_sync  <= '0;
      shreg     <= '0;
      tx_serial <= 1'b0;
    end else begin
      tgl_sync <= {tgl_sync[1:0], sys_tgl};
      if (load) begin
        tx_serial <= byte_q[0];
        shreg     <= byte_q[BYTE_W-1:1];
      end else begin
        tx_serial <= shreg[0];
        shreg     <= {1'b0, shreg[BYTE_W-2:1]};
      end
    end
  end
endmodule
