// Testbench for pe_transmitter (64-word ROM, 16-word packets). Decodes the
// four serial lanes independently and checks, per lane, the header and that
// payload byte k of frame f equals byte <lane> of ROM word 16*f + k, with the
// ROM content recomputed here as a * 0x9E3779B1 + 0x7F4A7C15. Also checks
// that the four lanes send their payload in the same cycles (lockstep), that
// each payload takes exactly 16 system cycles, and that the splitter stalls
// while the generators are busy.
module tb_pe_transmitter;
  import pe_pkg::*;
  localparam int MW = 64, PW = 16, NPKT = MW / PW;
  logic clk_ser = 0, clk_sys = 0, rst_n = 0;
  logic start, busy, done, stall;
  logic [3:0] payload_active, frame_done, tx_serial;
  pe_header_t hdr [4];
  logic [3:0] bvalid; logic [7:0] bdata [4]; int bidx [4], frames [4];
  int checks = 0, failures = 0, n_stall = 0, n_done = 0, run = 0, n_runs = 0;
  int fr [4];

  pe_transmitter #(.MEM_WORDS(MW), .PKT_WORDS(PW)) dut (
    .clk_sys, .clk_ser, .rst_n, .start, .hdr, .busy, .done, .stall,
    .payload_active, .frame_done, .tx_serial
  );

  for (genvar i = 0; i < 4; i++) begin : g_mon
    tb_lane_monitor #(.PAYLOAD_BYTES(PW)) mon (
      .clk_ser, .rst_n, .line(tx_serial[i]), .bvalid(bvalid[i]), .bdata(bdata[i]),
      .bidx(bidx[i]), .frames(frames[i])
    );
  end

  always #0.5 clk_ser = ~clk_ser;
  initial begin #0.5; forever begin clk_sys = 1; #4; clk_sys = 0; #4; end end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] rom_word(int a);
    logic [63:0] p = 64'(a) * 64'h9E37_79B1 + 64'h7F4A_7C15;
    return p[31:0];
  endfunction

  always @(posedge clk_ser) for (int i = 0; i < 4; i++) if (bvalid[i]) begin
    if (bidx[i] < HDR_BYTES)
      check(bdata[i] == hdr[i][8*(HDR_BYTES-1-bidx[i]) +: 8], $sformatf("lane %0d header", i));
    else
      check(bdata[i] == rom_word(fr[i] * PW + bidx[i] - HDR_BYTES)[8*i +: 8],
            $sformatf("lane %0d frame %0d byte %0d", i, fr[i], bidx[i] - HDR_BYTES));
    if (bidx[i] == HDR_BYTES + PW - 1) fr[i]++;
  end

  always @(posedge clk_sys) if (rst_n) begin
    check(payload_active == 4'h0 || payload_active == 4'hF, "lanes in lockstep");
    if (payload_active[0]) run++;
    else if (run != 0) begin check(run == PW, $sformatf("payload run %0d", run)); run = 0; n_runs++; end
    if (stall) n_stall++;
    if (done) n_done++;
  end

  initial begin
    repeat (100000) @(posedge clk_ser);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    for (int i = 0; i < 4; i++)
      hdr[i] = '{dst_mac: 48'h0200_0000_0010 + 48'(i), src_mac: 48'h0200_0000_0020 + 48'(i),
                 dst_ip: 32'hC0A8_0100 + 32'(i), port: 16'd6000 + 16'(i)};
    #20 rst_n = 1;
    @(negedge clk_sys) start = 1;
    @(negedge clk_sys) start = 0;
    wait (frames[0] == NPKT && frames[1] == NPKT && frames[2] == NPKT && frames[3] == NPKT);
    repeat (20) @(posedge clk_sys);
    check(n_done == 1, "done once");
    check(!busy, "idle at the end");
    check(n_runs == NPKT, $sformatf("payload runs %0d", n_runs));
    check(n_stall > 0, "splitter stalled");
    for (int i = 0; i < 4; i++) check(fr[i] == NPKT, $sformatf("lane %0d frames", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
