`timescale 1ps/1ps
// tb_eoc_column: one End-of-Column block with six modelled pixel strings and
// four behavioural TAC models. Hits with random arrival times and widths are
// generated on random strings; every output word is decoded back into a ToA
// and a ToT time and matched against the generated hit (same string and
// pixel, both times within 10 ps). Bursts of three near-simultaneous hits force
// the drop of a hit with both pairs busy and the lost flag; a second pixel
// during a pulse sets pile-up; words injected upstream must pass through.
module tb_eoc_column;
  import tof_pkg::*;
  localparam realtime TCLK = 6250;
  logic clk = 0, rst_n = 1;
  logic [14:0] coarse = 0;
  logic [5:0] str_toa = '0, str_tot = '0, str_pileup = '0, str_ack;
  logic [5:0][5:0] str_addr = '0;
  logic [3:0] framp, sramp, discr;
  logic [63:0] up_word = 0, dn_word;
  logic up_valid = 0, up_ready, dn_valid, dn_ready = 1, drop;
  int checks = 0, failures = 0;

  typedef struct { int str; int pix; bit pu; realtime t0; realtime t1; } hit_t;
  hit_t hits [$];
  int n_hits = 0, n_words = 0, n_drop = 0, n_lost = 0, n_pileup = 0, n_up = 0, n_up_sent = 0;
  int n_pair1 = 0;
  bit pu_next [6];

  always #3125 clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;

  eoc_column dut (.clk, .rst_n, .col_id(4'd7), .coarse_in(coarse), .str_toa, .str_tot,
    .str_addr, .str_pileup, .str_ack, .framp, .sramp, .discr, .up_word, .up_valid,
    .up_ready, .dn_word, .dn_valid, .dn_ready, .drop);

  for (genvar i = 0; i < 4; i++) begin : g_tac
    tac_model u_tac (.clk, .framp(framp[i]), .sramp(sramp[i]), .discr(discr[i]));
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

  // Modelled strings: cleared by their ACK.
  always @(str_ack) begin
    for (int s = 0; s < 6; s++)
      if (str_ack[s]) begin
        str_toa[s] = 0; str_tot[s] = 0; str_pileup[s] = 0;
      end
  end

  always @(posedge clk) if (drop) n_drop++;
  always @(posedge clk) if (dut.toa_hit[1] && !dut.u_disp.state[1]) n_pair1++;

  // A hit on string s: ToA edge now, ToT edge after width ps.
  task automatic fire(input int s, input int width, input bit pileup);
    hit_t h;
    int p;
    if (str_toa[s]) return;
    p = $urandom_range(0, 63);
    h.str = s; h.pix = p; h.pu = pileup; h.t0 = $realtime; h.t1 = $realtime + width;
    str_addr[s] = 6'(p);
    str_toa[s] = 1;
    fork
      begin
        if (pileup) #(width / 2) str_pileup[s] = str_toa[s];
        #(pileup ? width - width / 2 : width);
        if (str_toa[s]) str_tot[s] = 1;
      end
    join_none
    #1;
    // only hits that got a TDC are expected; a dropped hit is acked at the next edges
    hits.push_back(h);
    n_hits++;
  endtask

  // Decode and match output words.
  always @(posedge clk) begin
    if (dn_valid && dn_ready) begin
      event_word_t w;
      realtime ta, tt;
      int found;
      w = dn_word;
      if (w.hdr == 4'hA) begin
        check(w[31:0] == 32'(n_up), "upstream word order");
        n_up++;
      end else begin
        n_words++;
        check(w.hdr == DATA_HDR && w.col == 4'd7, "header and column");
        ta = 3125 + real'(w.coarse) * TCLK - real'(w.toa_fine) * 10.0;
        tt = 3125 + real'(w.coarse + 15'(w.dcoarse)) * TCLK - real'(w.tot_fine) * 10.0;
        found = -1;
        foreach (hits[k])
          if (found < 0 && hits[k].str == int'(w.str) && hits[k].pix == int'(w.pix)
              && (ta - hits[k].t0) <= 10 && (hits[k].t0 - ta) <= 10) found = k;
        check(found >= 0, $sformatf("word %h matches a hit (toa %0t)", w, ta));
        if (found >= 0) begin
          check((tt - hits[found].t1) <= 10 && (hits[found].t1 - tt) <= 10,
                $sformatf("ToT time %0t exp %0t", tt, hits[found].t1));
          check(w.pileup == hits[found].pu, "pile-up flag");
          hits.delete(found);
        end
        if (w.pileup) n_pileup++;
        check(w.lost == (w.lost_cnt != 0), "lost flag and count agree");
        if (w.lost) begin
          n_lost++;
          check(w.lost_cnt == 1, "one hit lost per burst");
        end
      end
    end
  end

  initial begin
    // Two reset pulses: the second gives the TDC trigger latches a clean
    // rising edge of their clear once the re-arm strobes have settled.
    #100 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk) rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int it = 0; it < 24; it++) begin
      int a, b, c;
      a = $urandom_range(0, 5);
      do b = $urandom_range(0, 5); while (b == a);
      do c = $urandom_range(0, 5); while (c == a || c == b);
      #($urandom_range(100, 6000));
      if (it % 4 == 3) begin
        // burst: a and b take both pairs, c is dropped
        fire(a, $urandom_range(3000, 60000), 0);
        #($urandom_range(20000, 30000));
        fire(b, $urandom_range(3000, 60000), 0);
        #($urandom_range(20000, 30000));
        str_toa[c] = 1;
        @(posedge clk);
        repeat (3) @(posedge clk);
        check(!str_toa[c], "burst hit dropped and acknowledged");
      end else begin
        fire(a, $urandom_range(3000, 80000), it[0]);
      end
      // upstream traffic
      @(negedge clk);
      up_word = {4'hA, 28'h0, 32'(n_up_sent)};
      up_valid = 1;
      @(posedge clk);
      while (!up_ready) @(posedge clk);
      @(negedge clk) up_valid = 0;
      n_up_sent++;
      // let both pairs finish
      #7_000_000;
    end
    #2_000_000;
    check(hits.size() == 0, $sformatf("%0d hits without a word", hits.size()));
    check(n_up == n_up_sent, "all upstream words passed");
    check(n_drop > 0, "drop happened");
    check(n_lost > 0, "lost flag reported");
    check(n_pileup > 0, "pile-up reported");
    check(n_pair1 > 0, "second TDC pair used");
    $display("hits=%0d words=%0d drops=%0d lost=%0d pileup=%0d up=%0d", n_hits, n_words,
             n_drop, n_lost, n_pileup, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
