`timescale 1ps/1ps
// string_config: slow-control receiver of one pixel string. It holds, for each
// of the 64 pixels, the discriminator threshold trim and an enable bit, and is
// written over a shared SPI bus that reaches every string of the chip.
//
// Packets are 32 bits, MSB first, sampled on the rising edge of sck while
// cs_n is low; several packets may follow each other within one cs_n frame.
//   [31:30] mode   0 unicast (column, string and pixel must match)
//                  1 string multicast (all pixels of the addressed string)
//                  2 column multicast (all pixels of the addressed column)
//                  3 broadcast (every pixel of the chip)
//   [29:26] column  [25:23] string  [22:17] pixel  [16:8] reserved
//   [7] pixel enable  [6] reserved  [5:0] threshold trim
// The write happens on the 32nd rising edge of sck. col_id and str_id are
// fixed by the placement of the string. Unicast/multicast/broadcast addressing
// and per-pixel threshold control follow the design; the packet layout, the
// trim width and the enable bit are this design's choices. Reset (rst_n, low)
// enables every pixel with a zero trim.
module string_config #(
  parameter int unsigned N_PIX  = 64,
  parameter int unsigned TRIM_W = 6
) (
  input  logic                 rst_n,
  input  logic                 sck,
  input  logic                 mosi,
  input  logic                 cs_n,
  input  logic [3:0]           col_id,
  input  logic [2:0]           str_id,
  output logic [N_PIX-1:0][TRIM_W-1:0] thr_trim,
  output logic [N_PIX-1:0]     pix_en
);
  typedef enum logic [1:0] {
    M_UNICAST = 2'd0, M_STRING = 2'd1, M_COLUMN = 2'd2, M_BROADCAST = 2'd3
  } spi_mode_t;

  logic [30:0] sr;
  logic [4:0]  cnt;
  logic [31:0] pkt;
  logic        wr;
  spi_mode_t   mode;
  logic        hit_col, hit_str;

  assign pkt     = {sr, mosi};
  assign wr      = (cnt == 5'd31);
  assign mode    = spi_mode_t'(pkt[31:30]);
  assign hit_col = (pkt[29:26] == col_id);
  assign hit_str = hit_col && (pkt[25:23] == str_id);

  // Shift register and bit counter; the counter restarts with every cs_n frame.
  logic frame_clr;
  assign frame_clr = cs_n || !rst_n;

  always_ff @(posedge sck or posedge frame_clr) begin
    if (frame_clr) begin
      cnt <= '0;
      sr  <= '0;
    end else begin
      cnt <= cnt + 5'd1;
      sr  <= pkt[30:0];
    end
  end

  always_ff @(posedge sck or negedge rst_n) begin
    if (!rst_n) begin
      thr_trim <= '0;
      pix_en   <= '1;
    end else if (wr) begin
      for (int i = 0; i < N_PIX; i++) begin
        logic sel;
        unique case (mode)
          M_UNICAST:   sel = hit_str && (pkt[22:17] == 6'(i));
          M_STRING:    sel = hit_str;
          M_COLUMN:    sel = hit_col;
          M_BROADCAST: sel = 1'b1;
        endcase
        if (sel) begin
          thr_trim[i] <= pkt[TRIM_W-1:0];
          pix_en[i]   <= pkt[7];
        end
      end
    end
  end
endmodule
