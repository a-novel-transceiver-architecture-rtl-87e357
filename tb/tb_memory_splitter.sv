// Testbench for memory_splitter with a one-cycle-latency ROM model holding
// random words. Checks that lane i receives byte i of every word in address
// order, that no lane is pushed while it signals almost full, that stall is
// reported while back-pressured, that done pulses once after the last word,
// and that with no back-pressure N words leave in N consecutive cycles.
module tb_memory_splitter;
  import pe_pkg::*;
  localparam int N = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, stall, rom_en;
  logic [5:0] rom_addr;
  logic [31:0] rom_data;
  logic [3:0] afull, push;
  logic [7:0] lane_data [4];
  logic [31:0] rom [N];
  int checks = 0, failures = 0;
  int got [4];
  int n_done = 0, n_stall = 0, t_first, t_last, t_done;
  bit random_bp;

  memory_splitter #(.NUM_WORDS(N)) dut (
    .clk, .rst_n, .start, .busy, .done, .stall, .rom_en, .rom_addr, .rom_data,
    .lane_afull(afull), .lane_push(push), .lane_data
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rom_en) rom_data <= rom[rom_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // monitor
  logic [3:0] afull_q;
  always @(posedge clk) begin
    afull_q <= afull;
    if (rst_n) begin
      if (push[0]) begin
        if (got[0] == 0) t_first = $time;
        t_last = $time;
      end
      for (int i = 0; i < 4; i++) if (push[i]) begin
        check(lane_data[i] == rom[got[i]][8*i +: 8], $sformatf("lane %0d byte %0d", i, got[i]));
        got[i]++;
      end
      if (stall) n_stall++;
      if (done) begin n_done++; t_done = $time; end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-pressure generator: a push may follow an almost-full read by one cycle only
  always @(negedge clk) afull = random_bp ? 4'($urandom_range(0, 15) & {4{$urandom_range(0, 2) == 0}}) : 4'b0;

  initial begin
    for (int i = 0; i < N; i++) rom[i] = $urandom;
    random_bp = 0; start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      got = '{default: 0};
      n_done = 0;
      random_bp = (pass == 1);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (n_done == 1);
      repeat (3) @(posedge clk);
      for (int i = 0; i < 4; i++) check(got[i] == N, $sformatf("lane %0d count %0d", i, got[i]));
      check(!busy, "idle after done");
      // one word (four bytes, one per lane) per cycle: N words in N consecutive cycles
      if (pass == 0) check((t_last - t_first) / 10 == N - 1,
                           $sformatf("cycles %0d for %0d words", (t_last - t_first) / 10 + 1, N));
      check((t_done - t_last) / 10 == 1, "done one cycle after the last push");
      check(n_done == 1, "single done");
    end
    check(n_stall > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a read issued while any lane is almost full is a protocol error
  always @(posedge clk) if (rst_n && rom_en) check(afull == 4'b0, "read while almost full");
endmodule
