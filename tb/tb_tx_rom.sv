// Testbench for tx_rom: reads every word and compares it with the address
// hash a * 0x9E3779B1 + 0x7F4A7C15 (mod 2^32); also checks that the output
// holds while en is low and that data appears one cycle after the address.
module tb_tx_rom;
  localparam int DEPTH = 256;
  logic clk = 1'b0, en;
  logic [7:0] addr;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  tx_rom #(.DEPTH(DEPTH)) dut (.clk, .en, .addr, .rdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] expect_word(int a);
    logic [63:0] p = 64'(a) * 64'h9E37_79B1 + 64'h7F4A_7C15;
    return p[31:0];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    en = 0; addr = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); en = 1; addr = 8'(a);
      @(negedge clk); en = 0;
      checks++;
      if (rdata !== expect_word(a)) begin
        failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, expect_word(a));
      end
      held = rdata; addr = 8'(a + 7);
      @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL hold at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
