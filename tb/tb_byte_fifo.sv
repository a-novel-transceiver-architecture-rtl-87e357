// Testbench for byte_fifo: random pushes and pops against a queue model.
// Checks the first-word-fall-through data, count, empty/full flags, the
// almost_full threshold and that a push into a full FIFO is dropped and
// flagged as overflow.
module tb_byte_fifo;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, empty, full, afull, ovf;
  logic [7:0] wdata, rdata;
  logic [3:0] count;
  int checks = 0, failures = 0, n_ovf = 0, n_full = 0;
  logic [7:0] model[$];

  byte_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full,
    .almost_full(afull), .count, .overflow(ovf)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ovf;
    push = 0; pop = 0; wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // bias towards filling in the first half, draining in the second
      push  = ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 80 : 30));
      pop   = !empty && ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 30 : 80));
      wdata = 8'($urandom);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(afull == (model.size() >= DEPTH - 1), "almost_full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rdata == model[0], "rdata");
      if (full) n_full++;
      exp_ovf = push && model.size() == DEPTH && !pop;
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && !exp_ovf) model.push_back(wdata);
      @(posedge clk);
      #1 check(ovf == exp_ovf, "overflow");
      if (ovf) n_ovf++;
    end
    check(n_ovf > 0, "overflow exercised");
    check(n_full > 0, "full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
