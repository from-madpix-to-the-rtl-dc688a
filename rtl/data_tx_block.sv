`timescale 1ps/1ps
// data_tx_block: data transmission block serving a group of columns (8 by
// default). Event words arriving from the End-of-Column chain are stored in a
// 32-word FIFO and sent on one serial link at one bit per clock (160 Mbit/s
// SDR at 160 MHz), MSB first, 64 bits per word.
//
// The link always carries whole 64-bit words. With nothing to send it repeats
// the comma word. When data is waiting, a frame is sent: an open-frame word
// (D584 followed by a 48-bit frame number), up to FRAME_MAX data words, and a
// close-frame word (C584 followed by the 48-bit number of data words in the
// frame). The next word is chosen while the last bit of the current one is on
// the line, so words follow without gaps.
//
// Link sharing: with lend_en set, this block's link is disabled (tx_en low)
// and its FIFO head is offered to the neighbouring block through head_*; with
// share_en set, this block also takes words from the neighbour (nb_*),
// alternating between the two sources inside its frames (time-division access
// to one link). The 32-word FIFO, the 160 Mbit/s SDR rate, the frame word
// prefixes and the sharing between adjacent blocks follow the design; the
// low bits of the open/close words, FRAME_MAX and the alternation rule are
// this design's choices.
module data_tx_block
  import tof_pkg::*;
#(
  parameter int unsigned DEPTH     = 32,
  parameter int unsigned FRAME_MAX = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        share_en,
  input  logic        lend_en,
  input  logic [63:0] in_word,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] nb_word,
  input  logic        nb_valid,
  output logic        nb_ready,
  output logic [63:0] head_word,
  output logic        head_valid,
  input  logic        head_ready,
  output logic        tx_data,
  output logic        tx_en,
  output logic [31:0] frames_sent,
  output logic [$clog2(DEPTH):0] fifo_level
);
  typedef enum logic {F_IDLE, F_DATA} frame_state_t;

  frame_state_t state;
  logic [63:0]  sr, next_word;
  logic [5:0]   bitcnt;
  logic         load;
  logic [63:0]  fifo_word;
  logic         fifo_valid, fifo_ready, fifo_pop_local;
  logic         loc_avail, nb_avail, use_nb, prefer_nb;
  logic [47:0]  frame_no, nwords;

  sram_fifo #(.DEPTH(DEPTH), .W(64)) u_fifo (
    .clk, .rst_n, .in_word, .in_valid, .in_ready,
    .out_word(fifo_word), .out_valid(fifo_valid), .out_ready(fifo_ready), .level(fifo_level)
  );

  assign head_word  = fifo_word;
  assign head_valid = fifo_valid && lend_en;
  assign fifo_ready = lend_en ? head_ready : fifo_pop_local;
  assign tx_en      = !lend_en;
  assign tx_data    = sr[63];
  assign load       = (bitcnt == 6'd63);

  assign loc_avail = fifo_valid && !lend_en;
  assign nb_avail  = nb_valid && share_en;
  assign use_nb    = nb_avail && (prefer_nb || !loc_avail);

  // Choice of the next word on the line.
  always_comb begin
    next_word      = COMMA;
    fifo_pop_local = 1'b0;
    nb_ready       = 1'b0;
    if (load) begin
      unique case (state)
        F_IDLE: if (loc_avail || nb_avail) next_word = {OPEN_HDR, frame_no};
        F_DATA: begin
          if ((loc_avail || nb_avail) && nwords < 48'(FRAME_MAX)) begin
            if (use_nb) begin
              next_word = nb_word;
              nb_ready  = 1'b1;
            end else begin
              next_word      = fifo_word;
              fifo_pop_local = 1'b1;
            end
          end else begin
            next_word = {CLOSE_HDR, nwords};
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= F_IDLE;
      sr          <= COMMA;
      bitcnt      <= '0;
      frame_no    <= '0;
      nwords      <= '0;
      prefer_nb   <= 1'b0;
      frames_sent <= '0;
    end else begin
      bitcnt <= bitcnt + 1'b1;
      if (load) begin
        sr <= next_word;
        unique case (state)
          F_IDLE: if (loc_avail || nb_avail) begin
            state  <= F_DATA;
            nwords <= '0;
          end
          F_DATA: begin
            if (nb_ready || fifo_pop_local) begin
              nwords    <= nwords + 1'b1;
              prefer_nb <= !nb_ready;
            end else begin
              state       <= F_IDLE;
              frame_no    <= frame_no + 1'b1;
              frames_sent <= frames_sent + 1'b1;
            end
          end
          default: state <= F_IDLE;
        endcase
      end else begin
        sr <= {sr[62:0], 1'b0};
      end
    end
  end
endmodule
