`timescale 1ps/1ps
// event_buffer: one-word event buffer behind a TDC pair (ToA and ToT channel).
//
// It watches the two TDCs of its pair. When both hold a result (the slower of
// the two decides) and the pair has handed over the string/pixel metadata, it
// builds the 64-bit event word, stores it, and pulses clr to both TDCs so that
// they re-arm while the word waits for the column arbitration. The word is
// offered with a valid/ready handshake; a new word is loaded in the same cycle
// the previous one is taken. While the buffer is full, results stay in the
// TDCs and the pair remains busy.
//
// Word fields: ToA coarse and fine time, ToT fine time, ToT coarse minus ToA
// coarse on 4 bits, column/string/pixel address, lost flag with the number of lost hits, pile-up flag.
// Waiting for the slower TDC and forwarding to column arbitration follow the
// design; the single-word depth and the handshake are this design's choices.
module event_buffer
  import tof_pkg::*;
#(
  parameter int unsigned N_STRINGS = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [COLW-1:0]               col_id,
  input  logic                          toa_valid,
  input  logic [CW-1:0]                 toa_coarse,
  input  logic [FW-1:0]                 toa_fine,
  input  logic                          tot_valid,
  input  logic [CW-1:0]                 tot_coarse,
  input  logic [FW-1:0]                 tot_fine,
  input  logic                          meta_valid,
  input  logic [$clog2(N_STRINGS)-1:0]  meta_str,
  input  logic [PIXW-1:0]               meta_pix,
  input  logic                          meta_pileup,
  input  logic [LCW-1:0]                meta_lost_cnt,
  output logic                          clr,
  output event_word_t                   word,
  output logic                          word_valid,
  input  logic                          word_ready
);
  event_word_t next;
  logic        take;

  always_comb begin
    next          = '0;
    next.hdr      = DATA_HDR;
    next.toa_fine = toa_fine;
    next.tot_fine = tot_fine;
    next.col      = col_id;
    next.str      = STRW'(meta_str);
    next.pix      = meta_pix;
    next.coarse   = toa_coarse;
    next.dcoarse  = DCW'(tot_coarse - toa_coarse);
    next.lost     = (meta_lost_cnt != '0);
    next.lost_cnt = meta_lost_cnt;
    next.pileup   = meta_pileup;
  end

  assign take = word_valid && word_ready;
  assign clr  = toa_valid && tot_valid && meta_valid && (!word_valid || take);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_valid <= 1'b0;
      word       <= '0;
    end else if (clr) begin
      word_valid <= 1'b1;
      word       <= next;
    end else if (take) begin
      word_valid <= 1'b0;
    end
  end
endmodule
