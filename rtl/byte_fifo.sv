// Synchronous first-word-fall-through FIFO.
// One instance sits in every lane on both sides of the link: between the
// memory splitter and the frame generator, and between the frame checker and
// the memory combiner. rdata always shows the oldest entry while empty is
// low; pop removes it. push while full (and no pop in the same cycle) drops
// the byte and raises overflow for one cycle. almost_full is high when at
// most one entry is free, which lets a writer with one cycle of read latency
// in front of it stop in time. The document names the FIFO and its 8-bit
// ports only; depth and flags are this implementation's choices.
module byte_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic             almost_full,
  output logic [AW:0]      count,
  output logic             overflow
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty       = (count == '0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(DEPTH - 1));
  assign do_pop      = pop && !empty;
  assign do_push     = push && (!full || do_pop);
  assign rdata       = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("byte_fifo: pop while empty");
endmodule
