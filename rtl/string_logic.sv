`timescale 1ps/1ps
// string_logic: the single block of shared, clock-less control logic of one
// pixel string (4 x 16 = 64 pixels).
//
// The enabled discriminator outputs go through a balanced OR tree. The rising
// edge of the OR latches the ToA line and, with the same edge, the 6-bit
// address of the firing pixel from a combinational encoder (lowest index wins
// if several fire together). Once ToA is latched, a negative-edge flip-flop
// catches the falling edge of the OR and raises the ToT line. If any pixel
// other than the latched one fires while the event is held, the pile-up flag
// is set. Every flip-flop is cleared by the asynchronous ACK returned by the
// End-of-Column TDC block; a new event is accepted only after that.
//
// Interface: disc/pix_en per pixel; toa, tot, addr, pileup towards the EoC;
// ack from the EoC; rst_n (low) clears the string like ack. Timing: toa follows the first rising edge of the OR and
// tot the following falling edge, with only gate delays; there is no clock.
// The OR tree, encoder, edge latches, pile-up rule and ACK reset follow the
// design; the pixel enable mask and the tie-break on simultaneous hits are
// this design's choices.
module string_logic #(
  parameter int unsigned N_PIX = 64
) (
  input  logic [N_PIX-1:0]         disc,
  input  logic [N_PIX-1:0]         pix_en,
  input  logic                     ack,
  input  logic                     rst_n,
  output logic                     toa,
  output logic                     tot,
  output logic                     pileup,
  output logic [$clog2(N_PIX)-1:0] addr
);
  localparam int unsigned AW = $clog2(N_PIX);

  logic [N_PIX-1:0] hits;
  logic             trig;
  logic [AW-1:0]    enc;
  logic             other_fire;

  assign hits = disc & pix_en;

  or_tree #(.N(N_PIX)) u_or (.in(hits), .out(trig));

  // Lowest-index encoder of the firing pixels.
  always_comb begin
    enc = '0;
    for (int i = N_PIX - 1; i >= 0; i--)
      if (hits[i]) enc = AW'(i);
  end

  // One asynchronous clear for all string flip-flops: the EoC ack or reset.
  logic clr;
  assign clr = ack || !rst_n;

  // ToA latch and address register, clocked by the OR tree.
  always_ff @(posedge trig or posedge clr) begin
    if (clr) begin
      toa  <= 1'b0;
      addr <= '0;
    end else if (!toa) begin
      toa  <= 1'b1;
      addr <= enc;
    end
  end

  // ToT latch on the falling edge of the OR, enabled by the ToA latch.
  always_ff @(negedge trig or posedge clr) begin
    if (clr) tot <= 1'b0;
    else if (toa) tot <= 1'b1;
  end

  // Pile-up: any pixel other than the latched one fires during the event.
  always_comb begin
    logic [N_PIX-1:0] others;
    others     = hits;
    others[addr] = 1'b0;
    other_fire = toa && (others != '0);
  end

  always_ff @(posedge other_fire or posedge clr) begin
    if (clr) pileup <= 1'b0;
    else     pileup <= 1'b1;
  end
endmodule
