// Testbench helper: watches one serial lane and decodes frames.
// Bits are taken least significant first on every rising edge of clk_ser.
// While idle it looks for the byte pair 0x55, 0xD5; after it, the next
// HDR_BYTES + PAYLOAD_BYTES bytes are reported one at a time on bvalid with
// their position in the frame on bidx. frames counts complete frames.
module tb_lane_monitor
  import pe_pkg::*;
#(
  parameter int PAYLOAD_BYTES = 16
) (
  input  logic       clk_ser,
  input  logic       rst_n,
  input  logic       line,
  output logic       bvalid,
  output logic [7:0] bdata,
  output int         bidx,
  output int         frames
);
  logic [15:0] hist = '0;
  bit          active = 0;
  int          nbits = 0, nbytes = 0;

  initial begin bvalid = 0; bdata = 0; bidx = 0; frames = 0; end

  always @(posedge clk_ser) begin
    logic [15:0] h;
    h = {line, hist[15:1]};
    hist <= h;
    bvalid <= 0;
    if (!rst_n) begin
      active <= 0;
    end else if (!active) begin
      if (h == 16'hD555) begin active <= 1; nbits <= 0; nbytes <= 0; end
    end else begin
      nbits <= nbits + 1;
      if (nbits % 8 == 7) begin
        bvalid <= 1;
        bdata  <= h[15:8];
        bidx   <= nbytes;
        nbytes <= nbytes + 1;
        if (nbytes == HDR_BYTES + PAYLOAD_BYTES - 1) begin
          active <= 0;
          frames <= frames + 1;
        end
      end
    end
  end
endmodule
