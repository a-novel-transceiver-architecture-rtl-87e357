// Frame checker (receive transport layer, one per lane).
// Network side (clk_ser, 1 GHz): the serial line is registered and shifted,
// least significant bit first, into a 16-bit window. While hunting, the
// window is compared with the last preamble byte followed by the start
// delimiter (0x55, 0xD5); a match fixes the byte boundary. The next
// HDR_BYTES + PAYLOAD_BYTES bytes are collected 8 bits at a time and written,
// with a first-byte flag, into a 4-entry ring; then the checker hunts again.
// The ring's write pointer crosses to the system side in Gray code through
// two flip-flops, so the system side only reads entries that are complete.
// System side (clk_sys, 125 MHz): bytes are taken from the ring one per
// cycle. The header bytes are gathered and, with the last one, the
// destination MAC, IP address and port are compared with this port's default
// setting (cfg). If they match, frame_ok pulses and the payload bytes leave on
// out_valid/out_data, one per cycle, with the header removed; otherwise
// frame_drop pulses and the payload is discarded.
// Serial-to-8-bit conversion, header comparison with the port's default
// setting and header removal follow the document; frame layout, bit order,
// the delimiter search and the ring crossing are this implementation's.
module frame_checker
  import pe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = pe_pkg::PACKET_WORDS
) (
  input  logic              clk_ser,
  input  logic              clk_sys,
  input  logic              rst_n,
  input  logic              rx_serial,
  input  pe_rx_cfg_t        cfg,
  output logic              out_valid,
  output logic [BYTE_W-1:0] out_data,
  output logic              frame_ok,
  output logic              frame_drop
);
  localparam int unsigned FRAME_BYTES = HDR_BYTES + PAYLOAD_BYTES;
  localparam int unsigned BW = $clog2(FRAME_BYTES + 1);
  localparam logic [15:0] SYNC_WORD = {SFD_BYTE, PREAMBLE_BYTE};

  typedef struct packed {
    logic              first;
    logic [BYTE_W-1:0] data;
  } ring_entry_t;

  // ---------------- serial side ----------------
  logic              rx_q;
  logic [15:0]       win, win_n;
  logic              in_frame;
  logic [2:0]        bitcnt;
  logic [BW-1:0]     bytecnt;
  ring_entry_t       ring [4];
  logic [2:0]        wp_bin, wp_gray;

  assign win_n = {rx_q, win[15:1]};

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      rx_q     <= 1'b0;
      win      <= '0;
      in_frame <= 1'b0;
      bitcnt   <= '0;
      bytecnt  <= '0;
      wp_bin   <= '0;
      wp_gray  <= '0;
    end else begin
      rx_q <= rx_serial;
      win  <= win_n;
      if (!in_frame) begin
        if (win_n == SYNC_WORD) begin
          in_frame <= 1'b1;
          bitcnt   <= '0;
          bytecnt  <= '0;
        end
      end else begin
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == 3'(SER_RATIO - 1)) begin
          ring[wp_bin[1:0]] <= '{first: (bytecnt == '0), data: win_n[15:8]};
          wp_bin  <= wp_bin + 1'b1;
          wp_gray <= (wp_bin + 1'b1) ^ ((wp_bin + 1'b1) >> 1);
          bytecnt <= bytecnt + 1'b1;
          if (bytecnt == BW'(FRAME_BYTES - 1)) in_frame <= 1'b0;
        end
      end
    end
  end

  // ---------------- system side ----------------
  logic [2:0]                 wp_s1, wp_s2, wp_sync, rp;
  logic                       have;
  ring_entry_t                ent;
  logic [HDR_BYTES*8-1:0]     hdr_sh, hdr_n;
  pe_header_t                 hdr_view;
  logic [BW-1:0]              idx;
  logic                       match_q, hdr_done;

  always_comb begin
    wp_sync[2] = wp_s2[2];
    wp_sync[1] = wp_s2[1] ^ wp_sync[2];
    wp_sync[0] = wp_s2[0] ^ wp_sync[1];
  end

  assign have     = (rp != wp_sync);
  assign ent      = ring[rp[1:0]];
  assign hdr_n    = {hdr_sh[HDR_BYTES*8-9:0], ent.data};
  assign hdr_view = pe_header_t'(hdr_n);
  assign hdr_done = have && (ent.first ? (HDR_BYTES == 1) : (idx == BW'(HDR_BYTES - 1)));

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      wp_s1      <= '0;
      wp_s2      <= '0;
      rp         <= '0;
      hdr_sh     <= '0;
      idx        <= BW'(FRAME_BYTES);
      match_q    <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      frame_ok   <= 1'b0;
      frame_drop <= 1'b0;
    end else begin
      wp_s1      <= wp_gray;
      wp_s2      <= wp_s1;
      out_valid  <= 1'b0;
      frame_ok   <= 1'b0;
      frame_drop <= 1'b0;
      if (have) begin
        rp <= rp + 1'b1;
        if (ent.first) begin
          idx     <= BW'(1);
          hdr_sh  <= hdr_n;
          match_q <= 1'b0;
        end else if (idx < BW'(HDR_BYTES)) begin
          idx    <= idx + 1'b1;
          hdr_sh <= hdr_n;
        end else if (idx < BW'(FRAME_BYTES)) begin
          idx       <= idx + 1'b1;
          out_valid <= match_q;
          out_data  <= ent.data;
        end
        if (hdr_done) begin
          if (hdr_view.dst_mac == cfg.mac && hdr_view.dst_ip == cfg.ip &&
              hdr_view.port == cfg.port) begin
            match_q  <= 1'b1;
            frame_ok <= 1'b1;
          end else begin
            match_q    <= 1'b0;
            frame_drop <= 1'b1;
          end
        end
      end
    end
  end
endmodule
