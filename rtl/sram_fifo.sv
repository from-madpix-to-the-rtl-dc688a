`timescale 1ps/1ps
// sram_fifo: first-in first-out buffer of a data transmission block, DEPTH
// words of W bits (32 x 64 by default), written as a memory array with one
// write and one read port so that it maps onto a two-port SRAM. The head word
// is read from the array combinationally (first-word fall-through). Interface
// is valid/ready on both sides: in_ready is low when full, out_valid is high
// when not empty; a word written into an empty FIFO is visible the next
// cycle. The 32-word depth follows the design; the rest is this design's
// choice.
module sram_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_word,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [W-1:0] out_word,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_word  = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
endmodule
