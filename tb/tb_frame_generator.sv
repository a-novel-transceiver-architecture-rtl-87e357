// Testbench for frame_generator (16-byte sub-packets). A queue stands in for
// the lane FIFO. Checks that no frame starts before a whole sub-packet is
// buffered, that the decoded serial frame carries the header sampled at
// frame start (most significant byte first) followed by the FIFO bytes in
// order, and that the payload occupies exactly PAYLOAD_BYTES consecutive
// system cycles (one byte per 125 MHz cycle, i.e. 8 serial bits per cycle).
module tb_frame_generator;
  import pe_pkg::*;
  localparam int P = 16, FRAMES = 4;
  logic clk_ser = 0, clk_sys = 0, rst_n = 0;
  logic enable, fifo_pop, payload_active, frame_done, tx_serial;
  pe_header_t hdr;
  logic [5:0] fifo_count;
  logic [7:0] fifo_rdata;
  logic [7:0] q[$];
  logic [7:0] sent[$];
  pe_header_t hdr_of [FRAMES];
  logic bvalid; logic [7:0] bdata; int bidx, frames;
  int checks = 0, failures = 0, run = 0, n_done = 0, n_pay = 0, pos = 0, fr = 0;
  bit early_start = 0;

  frame_generator #(.PAYLOAD_BYTES(P), .CW(6)) dut (
    .clk_sys, .clk_ser, .rst_n, .enable, .hdr, .fifo_count, .fifo_rdata, .fifo_pop,
    .payload_active, .frame_done, .tx_serial
  );
  tb_lane_monitor #(.PAYLOAD_BYTES(P)) mon (
    .clk_ser, .rst_n, .line(tx_serial), .bvalid, .bdata, .bidx, .frames
  );

  always #0.5 clk_ser = ~clk_ser;
  initial begin #0.5; forever begin clk_sys = 1; #4; clk_sys = 0; #4; end end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  assign fifo_count = 6'(q.size());
  assign fifo_rdata = q.size() > 0 ? q[0] : 8'h00;
  always @(posedge clk_sys) if (rst_n && fifo_pop) begin
    check(q.size() > 0, "pop from empty");
    if (q.size() > 0) void'(q.pop_front());
  end

  // payload must come in one unbroken run of P system cycles per frame
  always @(posedge clk_sys) if (rst_n) begin
    if (payload_active) run++;
    else if (run != 0) begin check(run == P, $sformatf("payload run %0d", run)); run = 0; n_pay++; end
    if (frame_done) n_done++;
  end

  // decoded bytes
  always @(posedge clk_ser) if (bvalid) begin
    if (bidx < HDR_BYTES)
      check(bdata == hdr_of[fr][8*(HDR_BYTES-1-bidx) +: 8], $sformatf("frame %0d header byte %0d", fr, bidx));
    else begin
      check(bdata == sent[pos], $sformatf("frame %0d payload byte %0d", fr, bidx - HDR_BYTES));
      pos++;
    end
    if (bidx == HDR_BYTES + P - 1) fr++;
  end

  initial begin
    repeat (40000) @(posedge clk_ser);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1;
    for (int f = 0; f < FRAMES; f++)
      hdr_of[f] = '{dst_mac: {16'h0A0B, 32'($urandom)}, src_mac: {16'h0C0D, 32'($urandom)},
                    dst_ip: $urandom, port: 16'($urandom)};
    hdr = hdr_of[0];
    #20 rst_n = 1;
    // part of a sub-packet only: nothing may be sent
    repeat (P - 3) begin sent.push_back(8'($urandom)); q.push_back(sent[$]); end
    repeat (60) begin @(posedge clk_sys); if (payload_active || mon.active) early_start = 1; end
    check(!early_start, "no frame before a whole sub-packet is buffered");
    for (int f = 0; f < FRAMES; f++) begin
      while (sent.size() < (f + 1) * P) begin sent.push_back(8'($urandom)); q.push_back(sent[$]); end
      wait (n_done == f + 1);
      hdr = (f + 1 < FRAMES) ? hdr_of[f + 1] : hdr_of[0];
    end
    repeat (40) @(posedge clk_sys);
    check(frames == FRAMES, $sformatf("frames decoded %0d", frames));
    check(pos == FRAMES * P, $sformatf("payload bytes %0d", pos));
    check(n_pay == FRAMES, "payload runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
