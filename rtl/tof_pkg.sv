`timescale 1ps/1ps
// tof_pkg: sizes, the 64-bit event word and the link frame words shared by the
// ToF ASIC readout. The field positions of the event word follow the readout
// word table of the design (column, string and pixel address, coarse time,
// delta coarse, lost and pile-up flags). The upper 30 bits are a header plus
// space left open for a lost-hit counter and similar; this design places there
// a 6-bit lost counter and the two 10-bit fine times, since a word without them
// could not rebuild the time of arrival. The frame word
// prefixes (comma BCBC, open D584, close C584, data F) follow the design; the
// low bits of the open/close words are this design's choice.
package tof_pkg;

  localparam int unsigned CW        = 15;  // coarse time bits, word bits 20..6
  localparam int unsigned FW        = 10;  // Wilkinson fine time bits
  localparam int unsigned DCW       = 4;   // delta coarse (ToT) bits
  localparam int unsigned COLW      = 4;   // column address bits
  localparam int unsigned STRW      = 3;   // string address bits
  localparam int unsigned PIXW      = 6;   // pixel address bits
  localparam int unsigned LCW       = 6;   // lost-hit counter bits

  // Event word as sent on the link, MSB first.
  typedef struct packed {
    logic [3:0]      hdr;       // 63..60 : 4'hF marks a data word
    logic [LCW-1:0]  lost_cnt;  // 59..54 : hits lost since the previous word (saturating)
    logic [FW-1:0]   toa_fine;  // 53..44 : ToA fine time (10 ps bins)
    logic [FW-1:0]   tot_fine;  // 43..34 : ToT fine time (10 ps bins)
    logic [COLW-1:0] col;       // 33..30
    logic [STRW-1:0] str;       // 29..27
    logic [PIXW-1:0] pix;       // 26..21
    logic [CW-1:0]   coarse;    // 20..6  : ToA coarse time
    logic [DCW-1:0]  dcoarse;   // 5..2   : ToT coarse minus ToA coarse
    logic            lost;      // 1      : an event was lost before this one
    logic            pileup;    // 0      : another pixel of the string fired
  } event_word_t;

  localparam logic [3:0]  DATA_HDR  = 4'hF;
  localparam logic [63:0] COMMA     = 64'hBCBC_BCBC_BCBC_BCBC;
  localparam logic [15:0] OPEN_HDR  = 16'hD584;
  localparam logic [15:0] CLOSE_HDR = 16'hC584;

endpackage
