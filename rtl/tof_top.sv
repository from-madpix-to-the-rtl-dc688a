`timescale 1ps/1ps
// tof_top: digital part of the Alice 3 ToF monolithic LGAD ASIC (one of the
// two 26 mm x 16 mm chips of a reticle).
//
// The sensitive area is split into N_COLS columns of 1 mm. Each column holds
// N_STRINGS pixel strings of N_PIX pixels; every string has its own clock-less
// string_logic (trigger, address, ToT and pile-up latches) and a
// string_config slow-control receiver with the per-pixel threshold trims. At
// the bottom of each column an eoc_column block measures the strings' ToA and
// ToT edges with two TDC pairs and turns them into 64-bit event words. The
// columns of each group of COLS_PER_LINK are chained, column to column, into a
// data_tx_block that frames the words and sends them on one 160 Mbit/s
// serial link. With share_mode set, each odd link lends its data to the even
// link next to it, halving the number of active links.
//
// Outside this module, and reached through its ports, are the analog parts:
// the pixel front-ends and discriminators (disc in, thr_trim out), the analog
// ramps and comparators of the TDCs (framp/sramp out, discr in, index
// 2*pair for ToA and 2*pair+1 for ToT), the jitter-cleaning PLL (clk in, the
// 160 MHz system clock) and the LVDS drivers (tx_data/tx_en out). A 15-bit
// timestamp counter, shared by all TDCs, counts clk from reset. The numbers of
// columns, strings, pixels, TDCs and links follow the design; the chain
// direction (towards the lowest column of a group) and the sharing pairs are
// this design's choices.
module tof_top
  import tof_pkg::*;
#(
  parameter int unsigned N_COLS        = 16,
  parameter int unsigned COLS_PER_LINK = 8,
  parameter int unsigned N_STRINGS     = 6,
  parameter int unsigned N_PIX         = 64,
  parameter int unsigned N_PAIRS       = 2,
  parameter int unsigned TRIM_W        = 6,
  parameter int unsigned N_LINKS       = N_COLS / COLS_PER_LINK
) (
  input  logic                                                clk,
  input  logic                                                rst_n,
  input  logic [N_COLS-1:0][N_STRINGS-1:0][N_PIX-1:0]         disc,
  output logic [N_COLS-1:0][N_STRINGS-1:0][N_PIX-1:0][TRIM_W-1:0] thr_trim,
  input  logic                                                spi_sck,
  input  logic                                                spi_mosi,
  input  logic                                                spi_cs_n,
  input  logic                                                share_mode,
  output logic [N_COLS-1:0][2*N_PAIRS-1:0]                    framp,
  output logic [N_COLS-1:0][2*N_PAIRS-1:0]                    sramp,
  input  logic [N_COLS-1:0][2*N_PAIRS-1:0]                    discr,
  output logic [N_LINKS-1:0]                                  tx_data,
  output logic [N_LINKS-1:0]                                  tx_en,
  output logic [N_COLS-1:0]                                   drop
);
  logic [CW-1:0] coarse;

  logic [N_COLS-1:0][N_STRINGS-1:0]            str_toa, str_tot, str_pileup, str_ack;
  logic [N_COLS-1:0][N_STRINGS-1:0][PIXW-1:0]  str_addr;
  logic [N_COLS-1:0][N_STRINGS-1:0][N_PIX-1:0] pix_en;

  // Chain between columns: index c carries the word leaving column c.
  logic [N_COLS-1:0][63:0] dn_word;
  logic [N_COLS-1:0]       dn_valid, dn_ready;

  logic [N_LINKS-1:0][63:0] head_word;
  logic [N_LINKS-1:0]       head_valid, head_ready;

  // Chip-wide timestamp counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coarse <= '0;
    else        coarse <= coarse + 1'b1;
  end

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    localparam int unsigned FIRST = (c / COLS_PER_LINK) * COLS_PER_LINK;
    localparam int unsigned LAST  = FIRST + COLS_PER_LINK - 1;

    logic [63:0] up_word;
    logic        up_valid, up_ready;

    for (genvar s = 0; s < N_STRINGS; s++) begin : g_str
      string_config #(.N_PIX(N_PIX), .TRIM_W(TRIM_W)) u_cfg (
        .rst_n, .sck(spi_sck), .mosi(spi_mosi), .cs_n(spi_cs_n),
        .col_id(COLW'(c)), .str_id(STRW'(s)),
        .thr_trim(thr_trim[c][s]), .pix_en(pix_en[c][s])
      );
      string_logic #(.N_PIX(N_PIX)) u_str (
        .disc(disc[c][s]), .pix_en(pix_en[c][s]), .ack(str_ack[c][s]), .rst_n,
        .toa(str_toa[c][s]), .tot(str_tot[c][s]), .pileup(str_pileup[c][s]),
        .addr(str_addr[c][s])
      );
    end

    if (c == LAST) begin : g_end
      assign up_word  = '0;
      assign up_valid = 1'b0;
    end else begin : g_mid
      assign up_word     = dn_word[c+1];
      assign up_valid    = dn_valid[c+1];
      assign dn_ready[c+1] = up_ready;
    end

    eoc_column #(.N_STRINGS(N_STRINGS), .N_PAIRS(N_PAIRS)) u_eoc (
      .clk, .rst_n, .col_id(COLW'(c)), .coarse_in(coarse),
      .str_toa(str_toa[c]), .str_tot(str_tot[c]), .str_addr(str_addr[c]),
      .str_pileup(str_pileup[c]), .str_ack(str_ack[c]),
      .framp(framp[c]), .sramp(sramp[c]), .discr(discr[c]),
      .up_word, .up_valid, .up_ready,
      .dn_word(dn_word[c]), .dn_valid(dn_valid[c]), .dn_ready(dn_ready[c]),
      .drop(drop[c])
    );
  end

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    logic        share_en, lend_en;
    logic [63:0] nb_word;
    logic        nb_valid, nb_ready;
    logic [31:0] frames_sent;
    logic [$clog2(32):0] fifo_level;

    if (l % 2 == 0 && l + 1 < N_LINKS) begin : g_taker
      assign share_en        = share_mode;
      assign lend_en         = 1'b0;
      assign nb_word         = head_word[l+1];
      assign nb_valid        = head_valid[l+1];
      assign head_ready[l+1] = nb_ready;
      assign head_ready[l]   = 1'b0;
    end else if (l % 2 == 1) begin : g_lender
      assign share_en = 1'b0;
      assign lend_en  = share_mode;
      assign nb_word  = '0;
      assign nb_valid = 1'b0;
    end else begin : g_alone
      assign share_en      = 1'b0;
      assign lend_en       = 1'b0;
      assign nb_word       = '0;
      assign nb_valid      = 1'b0;
      assign head_ready[l] = 1'b0;
    end

    data_tx_block #(.DEPTH(32)) u_tx (
      .clk, .rst_n, .share_en, .lend_en,
      .in_word(dn_word[l*COLS_PER_LINK]), .in_valid(dn_valid[l*COLS_PER_LINK]),
      .in_ready(dn_ready[l*COLS_PER_LINK]),
      .nb_word, .nb_valid, .nb_ready,
      .head_word(head_word[l]), .head_valid(head_valid[l]), .head_ready(head_ready[l]),
      .tx_data(tx_data[l]), .tx_en(tx_en[l]), .frames_sent, .fifo_level
    );
  end
endmodule
