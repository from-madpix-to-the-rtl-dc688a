`timescale 1ps/1ps
// tdc_dispatch: shares the TDC pairs (one ToA and one ToT channel each) of a
// column among its pixel strings, so that the pairs derandomise the hits.
//
// Exactly one free pair is armed at a time, the lowest-numbered free one. Its
// ToA trigger is the OR of the ToA lines of all strings that are not already
// being served, so the rising edge of a string's ToA line starts that TDC with
// no clock in the path; the same edge latches which string it was (lowest
// index if several). The pair's ToT trigger is the ToT line of that string,
// gated by the ToA hit. Once the ToT channel has fired (seen on the clock),
// the pair samples the pixel address, the pile-up flag and the pending lost
// flag for the event word, then returns a one-cycle ACK to the string, which
// clears it. The pair becomes free again when both its TDCs have been read out and
// re-armed.
//
// When a string fires and no pair is free, it is acknowledged at once, the
// hit is dropped and counted; the next event word of the column carries the
// lost flag and the number of hits dropped since the previous word (saturating
// at 63).
// A string that fires within the same clock cycle as another one is served by
// the next pair from the following clock edge, so its ToA is late by up to one
// clock period.
//
// The two ToA/ToT pairs per column, the ACK back to the string and the lost
// flag follow the design; the arming rule, the drop policy and the ACK timing
// are this design's choices.
module tdc_dispatch #(
  parameter int unsigned N_STRINGS = 6,
  parameter int unsigned N_PAIRS   = 2,
  parameter int unsigned PIXW      = 6,
  parameter int unsigned LCW       = 6
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_STRINGS-1:0]              str_toa,
  input  logic [N_STRINGS-1:0]              str_tot,
  input  logic [N_STRINGS-1:0][PIXW-1:0]    str_addr,
  input  logic [N_STRINGS-1:0]              str_pileup,
  output logic [N_STRINGS-1:0]              str_ack,
  output logic [N_PAIRS-1:0]                toa_trig,
  output logic [N_PAIRS-1:0]                tot_trig,
  input  logic [N_PAIRS-1:0]                toa_hit,
  input  logic [N_PAIRS-1:0]                tot_hit,
  input  logic [N_PAIRS-1:0]                toa_busy,
  input  logic [N_PAIRS-1:0]                tot_busy,
  output logic [N_PAIRS-1:0]                meta_valid,
  output logic [N_PAIRS-1:0][$clog2(N_STRINGS)-1:0] meta_str,
  output logic [N_PAIRS-1:0][PIXW-1:0]      meta_pix,
  output logic [N_PAIRS-1:0]                meta_pileup,
  output logic [N_PAIRS-1:0][LCW-1:0]       meta_lost_cnt,
  output logic                              drop       // a hit was dropped this cycle
);
  localparam int unsigned SW = $clog2(N_STRINGS);

  typedef enum logic [1:0] {P_FREE, P_TOA, P_ACK, P_BUSY} pair_state_t;

  pair_state_t [N_PAIRS-1:0] state;
  logic [N_PAIRS-1:0][SW-1:0] owner;
  logic [N_PAIRS-1:0]   armed;
  logic [N_STRINGS-1:0] owned, unowned, drop_ack;
  logic [N_PAIRS-1:0][SW-1:0] pick;
  logic                 any_free;
  logic [LCW-1:0]       lost_cnt;

  // Strings held by a pair until their ACK, and strings waiting for a TDC.
  always_comb begin
    owned = '0;
    for (int p = 0; p < N_PAIRS; p++)
      if (state[p] == P_TOA || state[p] == P_ACK) owned[owner[p]] = 1'b1;
    unowned = str_toa & ~owned & ~drop_ack;
  end

  // Only the lowest free pair is armed.
  always_comb begin
    armed    = '0;
    any_free = 1'b0;
    for (int p = 0; p < N_PAIRS; p++)
      if (state[p] == P_FREE && !any_free) begin
        armed[p] = 1'b1;
        any_free = 1'b1;
      end
  end

  always_comb begin
    for (int p = 0; p < N_PAIRS; p++) begin
      pick[p] = '0;
      for (int s = N_STRINGS - 1; s >= 0; s--)
        if (unowned[s]) pick[p] = SW'(s);
      toa_trig[p] = armed[p] && (unowned != '0);
      tot_trig[p] = toa_hit[p] && str_tot[owner[p]];
    end
  end

  // The string that raised the ToA trigger of a pair, latched by that edge.
  for (genvar p = 0; p < N_PAIRS; p++) begin : g_owner
    logic [SW-1:0] q;
    always_ff @(posedge toa_trig[p] or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= pick[p];
    end
    assign owner[p] = q;
  end

  always_comb begin
    str_ack = drop_ack;
    for (int p = 0; p < N_PAIRS; p++)
      if (state[p] == P_ACK) str_ack[owner[p]] = 1'b1;
  end

  assign drop = !any_free && (unowned != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= '{default: P_FREE};
      drop_ack     <= '0;
      lost_cnt     <= '0;
      meta_valid   <= '0;
      meta_str     <= '0;
      meta_pix     <= '0;
      meta_pileup  <= '0;
      meta_lost_cnt <= '0;
    end else begin
      logic [LCW-1:0] lost_now;
      logic           lost_taken;
      lost_now   = lost_cnt;
      lost_taken = 1'b0;
      drop_ack  <= drop ? unowned : '0;
      for (int p = 0; p < N_PAIRS; p++) begin
        unique case (state[p])
          P_FREE: if (toa_hit[p]) begin
            state[p]      <= P_TOA;
            meta_valid[p] <= 1'b0;
          end
          P_TOA: if (tot_hit[p]) begin
            // Sample the string before the ACK clears it.
            meta_str[p]    <= owner[p];
            meta_pix[p]    <= str_addr[owner[p]];
            meta_pileup[p] <= str_pileup[owner[p]];
            meta_lost_cnt[p] <= lost_taken ? '0 : lost_now;
            lost_taken      = lost_taken || (lost_now != '0);
            state[p]       <= P_ACK;
          end
          P_ACK: begin
            meta_valid[p]  <= 1'b1;
            state[p]       <= P_BUSY;
          end
          P_BUSY: if (!toa_busy[p] && !tot_busy[p]) begin
            state[p]      <= P_FREE;
            meta_valid[p] <= 1'b0;
          end
          default: state[p] <= P_FREE;
        endcase
      end
      lost_now = lost_taken ? '0 : lost_cnt;
      if (drop && lost_now != '1) lost_now = lost_now + 1'b1;
      lost_cnt <= lost_now;
    end
  end
endmodule
