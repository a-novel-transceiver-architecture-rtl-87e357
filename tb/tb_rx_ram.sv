// Testbench for rx_ram: writes random words to random addresses while
// reading others, and compares every read with a reference array.
module tb_rx_ram;
  localparam int DEPTH = 64;
  logic clk = 1'b0, we, rd_en;
  logic [5:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  rx_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .rd_en, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    bit chk;
    we = 0; rd_en = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = $urandom;
      ref_mem[i] = wdata; written[i] = 1;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 6'($urandom); wdata = $urandom;
      rd_en = 1; raddr = 6'($urandom);
      exp = ref_mem[raddr];           // read-before-write on the same address
      chk = written[raddr];
      @(posedge clk);
      if (we) begin ref_mem[waddr] = wdata; written[waddr] = 1; end
      #1;
      if (chk) begin
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL addr %0d got %h exp %h", raddr, rdata, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
