`timescale 1ps/1ps
// tb_tof_top: end-to-end test of the full chip at its default size (16
// columns x 6 strings x 64 pixels, 2 links). Behavioural TAC models close the
// loop of all 64 TDC channels. The test configures the pixels over SPI
// (broadcast trim, one pixel masked by a unicast packet), then fires
// discriminator pulses at random times and pixels, deserialises both links,
// parses the frames and decodes every data word back into column, string,
// pixel, ToA and ToT; each must match a generated hit to within 10 ps.
// Mechanisms that must each happen at least once: a pile-up, a hit dropped
// with both TDC pairs busy and the lost flag that follows, use of the second
// TDC pair, words from several columns merged on one link, the shared-link
// mode (link 1 disabled, its columns' words on link 0), and the masked pixel
// being ignored.
module tb_tof_top;
  import tof_pkg::*;
  localparam realtime TCLK = 6250;
  localparam realtime WRAP = 32768.0 * 6250.0;
  logic clk = 0, rst_n = 1;
  logic [15:0][5:0][63:0] disc = '0;
  logic [15:0][5:0][63:0][5:0] thr_trim;
  logic spi_sck = 0, spi_mosi = 0, spi_cs_n = 0, share_mode = 0;
  logic [15:0][3:0] framp, sramp, discr;
  logic [1:0] tx_data, tx_en;
  logic [15:0] drop;
  int checks = 0, failures = 0;
  realtime t_rst;

  typedef struct { int col; int str; int pix; bit pu; bit may_drop; realtime t0; realtime t1; } hit_t;
  hit_t hits [$];
  int n_words = 0, n_drop = 0, n_lost = 0, n_pileup = 0, n_pair1 = 0, n_shared = 0;
  int n_frames = 0, n_masked_words = 0, n_dropped_expected = 0;
  int cols_on_link0 [16];

  always #3125 clk = ~clk;

  tof_top dut (.clk, .rst_n, .disc, .thr_trim, .spi_sck, .spi_mosi, .spi_cs_n, .share_mode,
               .framp, .sramp, .discr, .tx_data, .tx_en, .drop);

  for (genvar c = 0; c < 16; c++) begin : g_c
    for (genvar i = 0; i < 4; i++) begin : g_t
      tac_model u_tac (.clk, .framp(framp[c][i]), .sramp(sramp[c][i]), .discr(discr[c][i]));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic spi_send(input logic [31:0] pkt);
    spi_cs_n = 0;
    for (int b = 31; b >= 0; b--) begin
      spi_mosi = pkt[b];
      #10000 spi_sck = 1;
      #10000 spi_sck = 0;
    end
    #10000 spi_cs_n = 1;
    #10000;
  endtask

  always @(posedge clk) begin
    if (|drop) n_drop++;
  end
  for (genvar c = 0; c < 16; c++) begin : g_mon
    always @(posedge dut.g_col[c].u_eoc.toa_hit[1]) n_pair1++;
  end

  // Deserialise and decode both links.
  for (genvar l = 0; l < 2; l++) begin : g_rx
    logic [63:0] sh;
    int nbit = 0, cnt = 0;
    bit in_frame = 0;
    always @(posedge clk) begin
      if (!rst_n) begin
        nbit = 0;
        in_frame = 0;
      end else begin
        sh = {sh[62:0], tx_data[l]};
        nbit++;
        if (nbit == 64) begin
          nbit = 0;
          if (!tx_en[l]) begin
          end else if (!in_frame) begin
            if (sh != COMMA) begin
              check(sh[63:48] == OPEN_HDR, $sformatf("link %0d open frame %h", l, sh));
              in_frame = 1;
              cnt = 0;
            end
          end else if (sh[63:48] == CLOSE_HDR) begin
            check(sh[47:0] == 48'(cnt), "close frame count");
            in_frame = 0;
            n_frames++;
          end else begin
            cnt++;
            decode(l, sh);
          end
        end
      end
    end
  end

  task automatic decode(input int l, input event_word_t w);
    realtime ta, tt;
    int found;
    n_words++;
    check(w.hdr == DATA_HDR, "data header");
    check(l == 0 ? (share_mode || w.col < 8) : w.col >= 8, $sformatf("column %0d on link %0d", w.col, l));
    if (l == 0) cols_on_link0[w.col]++;
    if (l == 0 && w.col >= 8) n_shared++;
    ta = t_rst + real'(w.coarse) * TCLK - real'(w.toa_fine) * 10.0;
    while (ta + WRAP < $realtime) ta += WRAP;
    tt = ta + real'(w.toa_fine) * 10.0 + real'(w.dcoarse) * TCLK - real'(w.tot_fine) * 10.0;
    found = -1;
    foreach (hits[k])
      if (found < 0 && hits[k].col == int'(w.col) && hits[k].str == int'(w.str)
          && hits[k].pix == int'(w.pix) && (ta - hits[k].t0) <= 10 && (hits[k].t0 - ta) <= 10)
        found = k;
    check(found >= 0, $sformatf("word %h matches a hit (toa %0t)", w, ta));
    if (found >= 0) begin
      check((tt - hits[found].t1) <= 10 && (hits[found].t1 - tt) <= 10,
            $sformatf("ToT %0t exp %0t", tt, hits[found].t1));
      check(w.pileup == hits[found].pu, "pile-up flag");
      hits.delete(found);
    end
    if (w.col == 2 && w.str == 1 && w.pix == 10) n_masked_words++;
    if (w.pileup) n_pileup++;
    check(w.lost == (w.lost_cnt != 0), "lost flag and count agree");
    if (w.lost) n_lost++;
  endtask

  // One discriminator pulse; with pu a second pixel of the same string fires inside it.
  task automatic fire(input int c, input int s, input int width, input bit pu, input bit may_drop);
    hit_t h;
    int p, q;
    p = $urandom_range(0, 63);
    if (c == 2 && s == 1 && p == 10) p = 11;
    h.col = c; h.str = s; h.pix = p; h.pu = pu; h.may_drop = may_drop;
    h.t0 = $realtime; h.t1 = $realtime + width;
    hits.push_back(h);
    disc[c][s][p] = 1;
    fork
      begin
        if (pu) begin
          do q = $urandom_range(0, 63); while (q == p);
          #(width / 4) disc[c][s][q] = 1;
          #(width / 4) disc[c][s][q] = 0;
          #(width - 2 * (width / 4));
        end else begin
          #(width);
        end
        disc[c][s][p] = 0;
      end
    join_none
  endtask

  task automatic round(input int n_cols, input bit burst, input bit pileup);
    int used [16];
    for (int c = 0; c < 16; c++) used[c] = 0;
    for (int i = 0; i < n_cols; i++) begin
      int c;
      do c = $urandom_range(0, 15); while (used[c] != 0);
      used[c] = 1;
      #($urandom_range(100, 9000));
      fire(c, $urandom_range(0, 5), $urandom_range(2000, 60000), pileup && i == 0, 0);
    end
    if (burst) begin
      int c, a, b, d;
      do c = $urandom_range(0, 15); while (used[c] != 0);
      a = $urandom_range(0, 5);
      do b = $urandom_range(0, 5); while (b == a);
      do d = $urandom_range(0, 5); while (d == a || d == b);
      fire(c, a, $urandom_range(2000, 30000), 0, 0);
      #40000 fire(c, b, $urandom_range(2000, 30000), 0, 0);
      #40000 fire(c, d, $urandom_range(2000, 30000), 0, 1);
      n_dropped_expected++;
    end
    #8_000_000;
  endtask

  initial begin
    for (int c = 0; c < 16; c++) cols_on_link0[c] = 0;
    // The first pulse clears the clocked logic, and with it the string acks
    // and TDC re-arm strobes; the second gives every asynchronous clear a
    // rising edge. SPI chip select stays low until then for the same reason.
    #100 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    spi_cs_n = 1;
    t_rst = $realtime + 3125;  // first counted edge: coarse value 0
    // broadcast: trim 5, enabled; then mask column 2, string 1, pixel 10
    spi_send({2'd3, 4'd0, 3'd0, 6'd0, 9'd0, 1'b1, 1'b0, 6'd5});
    spi_send({2'd0, 4'd2, 3'd1, 6'd10, 9'd0, 1'b0, 1'b0, 6'd33});
    check(thr_trim[0][0][0] == 6'd5 && thr_trim[15][5][63] == 6'd5, "broadcast trim");
    check(thr_trim[2][1][10] == 6'd33 && thr_trim[2][1][11] == 6'd5, "unicast trim");
    // masked pixel
    disc[2][1][10] = 1;
    #20000 disc[2][1][10] = 0;
    #1000;
    check(!dut.str_toa[2][1], "masked pixel does not trigger");
    for (int r = 0; r < 8; r++) round(6, r % 3 == 1, r % 2 == 0);
    @(negedge clk) share_mode = 1;
    #2_000_000;
    for (int r = 0; r < 8; r++) round(8, r % 3 == 2, r % 2 == 1);
    check(tx_en == 2'b01, "link 1 disabled in shared mode");
    #4_000_000;
    // every hit not allowed to be dropped has produced its word
    foreach (hits[k]) check(hits[k].may_drop, $sformatf("hit col %0d str %0d without word", hits[k].col, hits[k].str));
    check(n_drop > 0, "drop mechanism");
    check(n_lost > 0, "lost flag mechanism");
    check(n_pileup > 0, "pile-up mechanism");
    check(n_pair1 > 0, "second TDC pair used");
    check(n_shared > 0, "shared link carried columns 8-15");
    check(n_masked_words == 0, "no word from the masked pixel");
    check(n_frames > 0, "frames");
    $display("words=%0d frames=%0d drops=%0d lost=%0d pileup=%0d pair1=%0d shared=%0d",
             n_words, n_frames, n_drop, n_lost, n_pileup, n_pair1, n_shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
