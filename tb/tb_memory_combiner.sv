// Testbench for memory_combiner: four lane queues fill at random, unequal
// times (lane skew). Checks that a word is written only when every lane has a
// byte, that word k is {lane3[k], lane2[k], lane1[k], lane0[k]} at address k
// (wrapping), and that packet_done and the word counter follow.
module tb_memory_combiner;
  import pe_pkg::*;
  localparam int N = 32, PW = 8, TOTAL = 80;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] lane_empty, lane_pop;
  logic [7:0] lane_data [4];
  logic ram_we, packet_done;
  logic [4:0] ram_addr;
  logic [31:0] ram_wdata, words;
  logic [7:0] q [4][$];
  logic [31:0] sent [$];
  int checks = 0, failures = 0, n_written = 0, n_pkt = 0, n_wait = 0;
  int fed [4];

  memory_combiner #(.NUM_WORDS(N), .PKT_WORDS(PW)) dut (
    .clk, .rst_n, .lane_empty, .lane_data, .lane_pop, .ram_we, .ram_addr,
    .ram_wdata, .words, .packet_done
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always_comb for (int i = 0; i < 4; i++) begin
    lane_empty[i] = (q[i].size() == 0);
    lane_data[i]  = lane_empty[i] ? 8'h00 : q[i][0];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && packet_done) n_pkt++;

  initial begin
    for (int k = 0; k < TOTAL; k++) sent.push_back($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (n_written < TOTAL) begin
      @(posedge clk);
      if (rst_n && ram_we) begin
        check(lane_pop == 4'hF, "pop all lanes together");
        check(ram_wdata == sent[n_written], $sformatf("word %0d", n_written));
        check(int'(ram_addr) == n_written % N, "address");
        n_written++;
      end else if (lane_empty != 4'h0 && lane_empty != 4'hF) begin
        n_wait++;
        check(lane_pop == 4'h0, "no pop while a lane is empty");
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        if (lane_pop[i] && q[i].size() > 0) void'(q[i].pop_front());
        if (fed[i] < TOTAL && $urandom_range(0, 2) != 0) begin
          q[i].push_back(sent[fed[i]][8*i +: 8]);
          fed[i]++;
        end
      end
    end
    repeat (3) @(posedge clk);
    check(n_pkt == TOTAL / PW, $sformatf("packets %0d", n_pkt));
    check(words == TOTAL, "word counter");
    check(n_wait > 0, "skew exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
