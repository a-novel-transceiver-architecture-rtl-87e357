// Testbench for pe_receiver (64-word RAM, 16-word packets, 16-byte FIFOs).
// The testbench serialises four packets of random words itself: lane i
// carries byte i of every word, and every frame on every lane starts after
// its own random delay, so the lanes arrive skewed. Checks that the RAM ends
// up holding the words in order, the word and packet counters, and
// frame_ok. Then a frame with a wrong port on lane 2 must be dropped, no word
// may be written, and a further frame on the other lanes must overflow their
// full FIFOs.
module tb_pe_receiver;
  import pe_pkg::*;
  localparam int MW = 64, PW = 16, NPKT = MW / PW;
  logic clk_ser = 0, clk_sys = 0, rst_n = 0;
  logic [3:0] rx_serial, frame_ok, frame_drop, overflow;
  pe_rx_cfg_t cfg [4];
  logic rd_en; logic [5:0] rd_addr; logic [31:0] rd_data, words;
  logic packet_done;
  bit bits [4][$];
  logic [31:0] data [MW];
  int checks = 0, failures = 0, n_ok = 0, n_drop = 0, n_ovf = 0, n_pkt = 0, n_skew = 0;

  pe_receiver #(.MEM_WORDS(MW), .PKT_WORDS(PW)) dut (
    .clk_sys, .clk_ser, .rst_n, .rx_serial, .cfg, .rd_en, .rd_addr, .rd_data,
    .words, .packet_done, .frame_ok, .frame_drop, .overflow
  );

  always #0.5 clk_ser = ~clk_ser;
  initial begin #0.5; forever begin clk_sys = 1; #4; clk_sys = 0; #4; end end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk_ser)
    for (int i = 0; i < 4; i++) rx_serial[i] <= (bits[i].size() > 0) ? bits[i].pop_front() : 1'b0;

  task automatic put_byte(input int lane, input logic [7:0] b);
    for (int k = 0; k < 8; k++) bits[lane].push_back(b[k]);
  endtask

  // one frame on one lane: payload is byte <lane> of words base..base+PW-1
  task automatic frame(input int lane, input int base, input bit bad_port);
    pe_header_t h;
    h = '{dst_mac: cfg[lane].mac, src_mac: 48'h0200_0000_00FF, dst_ip: cfg[lane].ip,
          port: cfg[lane].port ^ {15'd0, bad_port}};
    repeat ($urandom_range(0, 60)) bits[lane].push_back(1'b0);
    repeat (PREAMBLE_LEN) put_byte(lane, PREAMBLE_BYTE);
    put_byte(lane, SFD_BYTE);
    for (int k = HDR_BYTES - 1; k >= 0; k--) put_byte(lane, h[8*k +: 8]);
    for (int k = 0; k < PW; k++) put_byte(lane, data[base + k][8*lane +: 8]);
    repeat (16) bits[lane].push_back(1'b0);
  endtask

  always @(posedge clk_sys) if (rst_n) begin
    n_ok   += $countones(frame_ok);
    n_drop += $countones(frame_drop);
    n_ovf  += $countones(overflow);
    if (packet_done) n_pkt++;
    if (dut.empty != 4'h0 && dut.empty != 4'hF) n_skew++;
  end

  initial begin
    repeat (300000) @(posedge clk_ser);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; rd_addr = 0;
    for (int i = 0; i < 4; i++)
      cfg[i] = '{mac: 48'h0200_0000_0010 + 48'(i), ip: 32'hC0A8_0100 + 32'(i), port: 16'd6000 + 16'(i)};
    for (int k = 0; k < MW; k++) data[k] = $urandom;
    #20 rst_n = 1;
    for (int p = 0; p < NPKT; p++)
      for (int i = 0; i < 4; i++) frame(i, p * PW, 1'b0);
    wait (bits[0].size() == 0 && bits[1].size() == 0 && bits[2].size() == 0 && bits[3].size() == 0);
    repeat (40) @(posedge clk_sys);
    check(words == MW, $sformatf("words %0d", words));
    check(n_pkt == NPKT, $sformatf("packets %0d", n_pkt));
    check(n_ok == 4 * NPKT, $sformatf("frames ok %0d", n_ok));
    check(n_skew > 0, "lane skew absorbed");
    for (int k = 0; k < MW; k++) begin
      @(negedge clk_sys) rd_en = 1; rd_addr = 6'(k);
      @(negedge clk_sys) rd_en = 0;
      check(rd_data == data[k], $sformatf("RAM word %0d: %h vs %h", k, rd_data, data[k]));
    end
    // wrong port on lane 2: dropped, nothing written
    for (int i = 0; i < 4; i++) frame(i, 0, i == 2);
    wait (bits[0].size() == 0 && bits[1].size() == 0 && bits[2].size() == 0 && bits[3].size() == 0);
    repeat (40) @(posedge clk_sys);
    check(n_drop == 1, $sformatf("frames dropped %0d", n_drop));
    check(words == MW, "no word from an incomplete set of lanes");
    check(n_ovf == 0, "no overflow yet");
    for (int i = 0; i < 4; i++) if (i != 2) frame(i, 0, 1'b0);
    wait (bits[0].size() == 0 && bits[1].size() == 0 && bits[3].size() == 0);
    repeat (40) @(posedge clk_sys);
    check(n_ovf == 3 * PW, $sformatf("overflowed bytes %0d", n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
