// End-to-end testbench for pe_top at reduced size (64-word memories, 16-word packets).
// The four serial lanes of the transmitter are looped back to the receiver
// through delay lines of 0, 5, 13 and 29 serial bits, so the lanes arrive
// skewed. Run 1 sends the whole ROM (64 words in packets of 16 words) and
// checks that the receive RAM then holds exactly the ROM content, recomputed
// here as a * 0x9E3779B1 + 0x7F4A7C15, and that each packet's payload is
// sent by all four lanes together in exactly 16 system cycles, i.e. 32
// payload bits per 125 MHz cycle. Run 2 changes the port that lane 2 expects:
// its frames must be dropped, nothing written, and the other lanes' FIFOs
// must overflow once they are full. Every mechanism (splitter stall, lockstep
// payload, accepted frame, absorbed lane skew, packet completion, header
// mismatch drop, FIFO overflow) is counted and must occur at least once;
// the splitter only stalls when there is more than one packet to send.
// Back-to-back frames must follow each other every PW + 30 system cycles.
module tb_pe_top;
  import pe_pkg::*;
  localparam int MW = 64, PW = 16, NPKT = MW / PW, AW = $clog2(MW);
  localparam int DELAY [4] = '{0, 5, 13, 29};
  logic clk_ser = 0, clk_sys = 0, rst_n = 0;
  logic tx_start, tx_busy, tx_done, tx_stall;
  logic [3:0] tx_payload_active, tx_frame_done, tx_serial, rx_serial;
  pe_header_t tx_hdr [4];
  pe_rx_cfg_t rx_cfg [4];
  logic rx_rd_en; logic [AW-1:0] rx_rd_addr; logic [31:0] rx_rd_data, rx_words;
  logic rx_packet_done;
  logic [3:0] rx_frame_ok, rx_frame_drop, rx_overflow;
  logic [31:0] dl [4];
  int checks = 0, failures = 0, run = 0;
  int t_prev = -1, n_period = 0;
  // start + preamble + delimiter + header + payload + gap, plus one cycle in
  // which the generator waits for the last refilled byte: the splitter stops
  // at almost-full and its ROM read adds a cycle, so it refills two cycles
  // behind the generator's pops
  localparam int FRAME_CYCLES = PW + 1 + PREAMBLE_LEN + 1 + HDR_BYTES + IFG_LEN + 1;
  int n_stall = 0, n_lockstep = 0, n_ok = 0, n_skew = 0, n_pkt = 0, n_drop = 0, n_ovf = 0, n_done = 0;

  pe_top #(.MEM_WORDS(MW), .PKT_WORDS(PW)) dut (
    .clk_sys, .clk_ser, .rst_n, .tx_start, .tx_hdr, .tx_busy, .tx_done, .tx_stall,
    .tx_payload_active, .tx_frame_done, .tx_serial, .rx_serial, .rx_cfg,
    .rx_rd_en, .rx_rd_addr, .rx_rd_data, .rx_words, .rx_packet_done,
    .rx_frame_ok, .rx_frame_drop, .rx_overflow
  );

  always #0.5 clk_ser = ~clk_ser;
  initial begin #0.5; forever begin clk_sys = 1; #4; clk_sys = 0; #4; end end

  // point-to-point loopback with a different delay per lane
  always @(posedge clk_ser) for (int i = 0; i < 4; i++) dl[i] <= {dl[i][30:0], tx_serial[i]};
  always_comb for (int i = 0; i < 4; i++) rx_serial[i] = (DELAY[i] == 0) ? tx_serial[i] : dl[i][DELAY[i] - 1];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] rom_word(int a);
    logic [63:0] p = 64'(a) * 64'h9E37_79B1 + 64'h7F4A_7C15;
    return p[31:0];
  endfunction

  always @(posedge clk_sys) if (rst_n) begin
    check(tx_payload_active == 4'h0 || tx_payload_active == 4'hF, "lanes in lockstep");
    if (tx_payload_active[0]) run++;
    else if (run != 0) begin
      check(run == PW, $sformatf("payload of one packet took %0d cycles", run));
      run = 0; n_lockstep++;
    end
    if (tx_stall) n_stall++;
    if (tx_done) n_done++;
    // back-to-back packets: one frame every FRAME_CYCLES system cycles
    if (tx_frame_done[0]) begin
      if (t_prev >= 0 && n_lockstep < NPKT) begin
        check(($time - t_prev) / 8 == FRAME_CYCLES,
              $sformatf("frame period %0d cycles, expected %0d", ($time - t_prev) / 8, FRAME_CYCLES));
        n_period++;
      end
      t_prev = $time;
    end
    if (rx_packet_done) n_pkt++;
    n_ok   += $countones(rx_frame_ok);
    n_drop += $countones(rx_frame_drop);
    n_ovf  += $countones(rx_overflow);
    if (dut.u_rx.empty != 4'h0 && dut.u_rx.empty != 4'hF) n_skew++;
  end

  initial begin
    repeat (8 * (6 * MW + 200 * NPKT + 4000)) @(posedge clk_ser);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_all();
    int d0;
    d0 = n_done;
    @(negedge clk_sys) tx_start = 1;
    @(negedge clk_sys) tx_start = 0;
    wait (n_done == d0 + 1);
    wait (!dut.u_tx.g_lane[0].u_gen.payload_active && dut.u_tx.g_lane[0].u_gen.state == 0
          && dut.u_tx.g_lane[3].u_gen.state == 0);
    repeat (40) @(posedge clk_sys);
  endtask

  initial begin
    tx_start = 0; rx_rd_en = 0; rx_rd_addr = 0;
    for (int i = 0; i < 4; i++) begin
      tx_hdr[i] = '{dst_mac: 48'h0200_0000_0010 + 48'(i), src_mac: 48'h0200_0000_0020 + 48'(i),
                    dst_ip: 32'hC0A8_0100 + 32'(i), port: 16'd6000 + 16'(i)};
      rx_cfg[i] = '{mac: 48'h0200_0000_0010 + 48'(i), ip: 32'hC0A8_0100 + 32'(i), port: 16'd6000 + 16'(i)};
    end
    #20 rst_n = 1;
    // run 1: the whole ROM
    send_all();
    check(rx_words == MW, $sformatf("words received %0d", rx_words));
    check(n_pkt == NPKT, $sformatf("packets completed %0d", n_pkt));
    check(n_ok == 4 * NPKT, $sformatf("frames accepted %0d", n_ok));
    check(n_lockstep == NPKT, $sformatf("payload runs %0d", n_lockstep));
    for (int k = 0; k < MW; k++) begin
      @(negedge clk_sys) rx_rd_en = 1; rx_rd_addr = AW'(k);
      @(negedge clk_sys) rx_rd_en = 0;
      check(rx_rd_data == rom_word(k), $sformatf("RAM word %0d: %h vs %h", k, rx_rd_data, rom_word(k)));
    end
    // run 2: lane 2 expects another port
    rx_cfg[2].port = 16'd7000;
    send_all();
    send_all();
    check(n_drop == 2 * NPKT, $sformatf("frames dropped %0d", n_drop));
    check(rx_words == MW, "nothing written without lane 2");
    check(n_ovf > 0, "overflow on the other lanes");
    $display("mechanisms: stall=%0d lockstep_payload=%0d frame_ok=%0d skew=%0d packet_done=%0d drop=%0d overflow=%0d",
             n_stall, n_lockstep, n_ok, n_skew, n_pkt, n_drop, n_ovf);
    if (NPKT > 1) check(n_stall > 0, "splitter stall happened");  // one packet fits its FIFOs
    check(n_lockstep > 0, "lockstep payload happened");
    check(n_ok > 0, "frame accepted");
    check(n_skew > 0, "lane skew absorbed");
    check(n_pkt > 0, "packet completed");
    check(n_drop > 0, "header mismatch drop happened");
    check(n_ovf > 0, "FIFO overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
