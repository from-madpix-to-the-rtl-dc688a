`timescale 1ps/1ps
// eoc_column: End-of-Column block of one 1 mm column. It receives the ToA and
// ToT lines, pixel addresses and pile-up flags of the column's six pixel
// strings and measures them with four TDC channels organised as two ToA/ToT
// pairs. tdc_dispatch assigns each firing string to a free pair and returns
// the ACK; each pair's event_buffer collects the two TDC results into a
// 64-bit word; eoc_chain_stage merges these words with the words coming from
// the upstream column and passes them one column further.
//
// The analog part of each TDC (fast/slow ramps and comparator) is outside:
// framp/sramp go to it and discr comes back, indexed 2*p (ToA) and 2*p+1
// (ToT) for pair p. coarse_in is the chip-wide timestamp counter. The four
// TDCs, the per-TDC event buffers and the chained column arbitration follow
// the design; the way they are wired together is this design's choice.
module eoc_column
  import tof_pkg::*;
#(
  parameter int unsigned N_STRINGS = 6,
  parameter int unsigned N_PAIRS   = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [COLW-1:0]                 col_id,
  input  logic [CW-1:0]                   coarse_in,
  input  logic [N_STRINGS-1:0]            str_toa,
  input  logic [N_STRINGS-1:0]            str_tot,
  input  logic [N_STRINGS-1:0][PIXW-1:0]  str_addr,
  input  logic [N_STRINGS-1:0]            str_pileup,
  output logic [N_STRINGS-1:0]            str_ack,
  output logic [2*N_PAIRS-1:0]            framp,
  output logic [2*N_PAIRS-1:0]            sramp,
  input  logic [2*N_PAIRS-1:0]            discr,
  input  logic [63:0]                     up_word,
  input  logic                            up_valid,
  output logic                            up_ready,
  output logic [63:0]                     dn_word,
  output logic                            dn_valid,
  input  logic                            dn_ready,
  output logic                            drop
);
  localparam int unsigned SW = $clog2(N_STRINGS);

  logic [N_PAIRS-1:0] toa_trig, tot_trig, toa_hit, tot_hit, toa_busy, tot_busy;
  logic [N_PAIRS-1:0] toa_valid, tot_valid, clr;
  logic [N_PAIRS-1:0][CW-1:0] toa_coarse, tot_coarse;
  logic [N_PAIRS-1:0][FW-1:0] toa_fine, tot_fine;
  logic [N_PAIRS-1:0] meta_valid, meta_pileup;
  logic [N_PAIRS-1:0][LCW-1:0] meta_lost_cnt;
  logic [N_PAIRS-1:0][SW-1:0] meta_str;
  logic [N_PAIRS-1:0][PIXW-1:0] meta_pix;
  logic [N_PAIRS-1:0][63:0] eb_word;
  logic [N_PAIRS-1:0] eb_valid, eb_ready;

  tdc_dispatch #(.N_STRINGS(N_STRINGS), .N_PAIRS(N_PAIRS), .PIXW(PIXW), .LCW(LCW)) u_disp (
    .clk, .rst_n, .str_toa, .str_tot, .str_addr, .str_pileup, .str_ack,
    .toa_trig, .tot_trig, .toa_hit, .tot_hit, .toa_busy, .tot_busy,
    .meta_valid, .meta_str, .meta_pix, .meta_pileup, .meta_lost_cnt, .drop
  );

  for (genvar p = 0; p < N_PAIRS; p++) begin : g_pair
    tdc_ctrl #(.CW(CW), .FW(FW)) u_tdc_toa (
      .clk, .rst_n, .en(1'b1), .trig(toa_trig[p]), .discr(discr[2*p]),
      .coarse_in, .clr(clr[p]), .hit(toa_hit[p]), .framp(framp[2*p]),
      .sramp(sramp[2*p]), .busy(toa_busy[p]), .valid(toa_valid[p]),
      .coarse(toa_coarse[p]), .fine(toa_fine[p])
    );
    tdc_ctrl #(.CW(CW), .FW(FW)) u_tdc_tot (
      .clk, .rst_n, .en(1'b1), .trig(tot_trig[p]), .discr(discr[2*p+1]),
      .coarse_in, .clr(clr[p]), .hit(tot_hit[p]), .framp(framp[2*p+1]),
      .sramp(sramp[2*p+1]), .busy(tot_busy[p]), .valid(tot_valid[p]),
      .coarse(tot_coarse[p]), .fine(tot_fine[p])
    );
    event_buffer #(.N_STRINGS(N_STRINGS)) u_eb (
      .clk, .rst_n, .col_id,
      .toa_valid(toa_valid[p]), .toa_coarse(toa_coarse[p]), .toa_fine(toa_fine[p]),
      .tot_valid(tot_valid[p]), .tot_coarse(tot_coarse[p]), .tot_fine(tot_fine[p]),
      .meta_valid(meta_valid[p]), .meta_str(meta_str[p]), .meta_pix(meta_pix[p]),
      .meta_pileup(meta_pileup[p]), .meta_lost_cnt(meta_lost_cnt[p]),
      .clr(clr[p]), .word(eb_word[p]), .word_valid(eb_valid[p]), .word_ready(eb_ready[p])
    );
  end

  eoc_chain_stage #(.N_LOCAL(N_PAIRS), .W(64)) u_chain (
    .clk, .rst_n, .up_word, .up_valid, .up_ready,
    .loc_word(eb_word), .loc_valid(eb_valid), .loc_ready(eb_ready),
    .dn_word, .dn_valid, .dn_ready
  );
endmodule
