// Testbench for frame_checker (16-byte sub-packets). The testbench builds
// serial frames itself (0x55 x7, 0xD5, 18 header bytes MSB first, payload,
// bits LSB first) with a random number of idle bits between frames, so the
// byte boundary lands at every bit offset. Frames addressed to this port
// must come out as their payload only, one byte per system cycle in an
// unbroken run; frames with a wrong MAC, IP address or port must be dropped.
// Payloads deliberately contain the 0x55 0xD5 pair.
module tb_frame_checker;
  import pe_pkg::*;
  localparam int P = 16, FRAMES = 24;
  logic clk_ser = 0, clk_sys = 0, rst_n = 0;
  logic rx_serial, out_valid, frame_ok, frame_drop;
  logic [7:0] out_data;
  pe_rx_cfg_t cfg;
  bit bits[$];
  logic [7:0] expect_q[$];
  int checks = 0, failures = 0, n_ok = 0, n_drop = 0, exp_ok = 0, exp_drop = 0, run = 0, n_out = 0;

  frame_checker #(.PAYLOAD_BYTES(P)) dut (
    .clk_ser, .clk_sys, .rst_n, .rx_serial, .cfg, .out_valid, .out_data, .frame_ok, .frame_drop
  );

  always #0.5 clk_ser = ~clk_ser;
  initial begin #0.5; forever begin clk_sys = 1; #4; clk_sys = 0; #4; end end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk_ser) rx_serial <= (bits.size() > 0) ? bits.pop_front() : 1'b0;

  task automatic put_byte(input logic [7:0] b);
    for (int i = 0; i < 8; i++) bits.push_back(b[i]);
  endtask

  task automatic send_frame(input int kind);   // 0 good, 1 bad mac, 2 bad ip, 3 bad port
    pe_header_t h;
    logic [7:0] pay [P];
    h = '{dst_mac: cfg.mac, src_mac: 48'h0200_0000_0001, dst_ip: cfg.ip, port: cfg.port};
    if (kind == 1) h.dst_mac[3] ^= 1'b1;
    if (kind == 2) h.dst_ip[20] ^= 1'b1;
    if (kind == 3) h.port = h.port + 16'd1;
    for (int i = 0; i < P; i++) pay[i] = 8'($urandom);
    pay[3] = PREAMBLE_BYTE; pay[4] = SFD_BYTE;
    repeat ($urandom_range(0, 40)) bits.push_back(1'b0);
    repeat (PREAMBLE_LEN) put_byte(PREAMBLE_BYTE);
    put_byte(SFD_BYTE);
    for (int i = HDR_BYTES - 1; i >= 0; i--) put_byte(h[8*i +: 8]);
    for (int i = 0; i < P; i++) put_byte(pay[i]);
    repeat (16) bits.push_back(1'b0);
    if (kind == 0) begin
      exp_ok++;
      for (int i = 0; i < P; i++) expect_q.push_back(pay[i]);
    end else exp_drop++;
  endtask

  always @(posedge clk_sys) if (rst_n) begin
    if (frame_ok) n_ok++;
    if (frame_drop) n_drop++;
    if (out_valid) begin
      run++; n_out++;
      check(expect_q.size() > 0, "unexpected output byte");
      if (expect_q.size() > 0) check(out_data == expect_q.pop_front(), "payload byte");
    end else if (run != 0) begin
      check(run == P, $sformatf("payload run %0d", run)); run = 0;
    end
  end

  initial begin
    repeat (200000) @(posedge clk_ser);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{mac: 48'h0200_1234_5678, ip: 32'hC0A8_0102, port: 16'd5001};
    #20 rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      send_frame((f % 3 == 0) ? 0 : ((f % 3 == 1) ? 0 : 1 + (f / 3) % 3));
      wait (bits.size() == 0);
    end
    repeat (60) @(posedge clk_sys);
    check(n_ok == exp_ok, $sformatf("frames accepted %0d of %0d", n_ok, exp_ok));
    check(n_drop == exp_drop, $sformatf("frames dropped %0d of %0d", n_drop, exp_drop));
    check(expect_q.size() == 0, "all payload delivered");
    check(n_out == exp_ok * P, "no extra bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
