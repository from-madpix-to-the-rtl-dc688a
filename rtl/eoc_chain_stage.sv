`timescale 1ps/1ps
// eoc_chain_stage: column arbitration and one stage of the End-of-Column data
// chain. Words move from column to column towards the data transmission block
// like a shift register, each stage arbitrating locally between the word
// coming from its upstream neighbour and the words of its own event buffers.
// This keeps every connection between adjacent blocks and avoids long routes
// from each column to the transmission block.
//
// Sources are index 0 (upstream) and 1..N_LOCAL (local event buffers). A
// round-robin pointer starts the search after the last granted source, so no
// source can be starved. The stage holds one word in an output register,
// reloaded in the same cycle it is taken; all ports use valid/ready. Latency
// through a stage is one clock. The shift-register chain with local
// arbitration follows the design; round robin and one-word depth are this
// design's choices.
module eoc_chain_stage #(
  parameter int unsigned N_LOCAL = 2,
  parameter int unsigned W       = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [W-1:0]               up_word,
  input  logic                       up_valid,
  output logic                       up_ready,
  input  logic [N_LOCAL-1:0][W-1:0]  loc_word,
  input  logic [N_LOCAL-1:0]         loc_valid,
  output logic [N_LOCAL-1:0]         loc_ready,
  output logic [W-1:0]               dn_word,
  output logic                       dn_valid,
  input  logic                       dn_ready
);
  localparam int unsigned NS = N_LOCAL + 1;
  localparam int unsigned PW = $clog2(NS);

  logic [NS-1:0][W-1:0] src_word;
  logic [NS-1:0]        src_valid, grant;
  logic [PW-1:0]        last, sel;
  logic                 load, found;

  assign src_word  = {loc_word, up_word};
  assign src_valid = {loc_valid, up_valid};
  assign load      = !dn_valid || dn_ready;

  always_comb begin
    sel   = '0;
    found = 1'b0;
    for (int k = 1; k <= NS; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % NS;
      if (!found && src_valid[idx]) begin
        sel   = PW'(idx);
        found = 1'b1;
      end
    end
    grant = '0;
    if (found && load) grant[sel] = 1'b1;
  end

  assign up_ready  = grant[0];
  assign loc_ready = grant[NS-1:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_valid <= 1'b0;
      dn_word  <= '0;
      last     <= PW'(NS - 1);
    end else if (load) begin
      dn_valid <= found;
      if (found) begin
        dn_word <= src_word[sel];
        last    <= sel;
      end
    end
  end

  // A word offered downstream must stay put until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dn_valid && !dn_ready |=> dn_valid && $stable(dn_word));
endmodule
