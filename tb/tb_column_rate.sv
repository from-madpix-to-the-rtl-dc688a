`timescale 1ps/1ps
// tb_column_rate: rate test of one column, six real string_logic blocks in
// front of one eoc_column with four behavioural TACs. Hits arrive as a
// Poisson process on random pixels of the column, each a discriminator pulse
// of 2 to 8 ns.
//
// Phase 1 runs the column at 300 kHz/cm2: a string is 4 x 16 pixels of
// 250 um, 0.04 cm2, so a column of six strings sees 72 kHz. A TDC pair is
// held until the slower of its two Wilkinson conversions ends, each 312 to
// 937 counts of the 160 MHz clock: about 730 cycles, 4.6 us, on average.
// Two pairs at 72 kHz then lose about 4 % of the hits (Erlang B with two
// servers), so at least 94 % of the hits must come out as data words.
// Phase 2 puts 5 MHz on one string alone and reports how many hits it loses,
// split into hits absorbed as pile-up by a string still holding an event and
// hits dropped because both TDC pairs were busy.
//
// Both phases check the accounting: every event a string latches leaves the
// column either as a data word or as a drop, and the lost counts carried by
// the words plus the pending count add up to the drops.
module tb_column_rate;
  import tof_pkg::*;
  localparam realtime TCLK = 6250;
  localparam int N_STR = 6;
  logic clk = 0, rst_n = 1;
  logic [14:0] coarse = 0;
  logic [N_STR-1:0][63:0] disc = '0;
  logic [N_STR-1:0] str_toa, str_tot, str_pileup, str_ack;
  logic [N_STR-1:0][5:0] str_addr;
  logic [3:0] framp, sramp, discr;
  logic [63:0] dn_word;
  logic up_ready, dn_valid, drop;
  int checks = 0, failures = 0;
  int n_gen = 0, n_ev = 0, n_words = 0, n_drop = 0, n_lost_sum = 0, n_pu_words = 0;
  int n_gen_s0 = 0, n_ev_s0 = 0, n_words_s0 = 0, n_drop_s0 = 0;

  always #3125 clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;

  for (genvar s = 0; s < N_STR; s++) begin : g_str
    string_logic u_str (.disc(disc[s]), .pix_en('1), .ack(str_ack[s]), .rst_n,
      .toa(str_toa[s]), .tot(str_tot[s]), .pileup(str_pileup[s]), .addr(str_addr[s]));
    always @(posedge str_toa[s]) begin
      n_ev++;
      if (s == 0) n_ev_s0++;
    end
  end

  eoc_column dut (.clk, .rst_n, .col_id(4'd3), .coarse_in(coarse), .str_toa, .str_tot,
    .str_addr, .str_pileup, .str_ack, .framp, .sramp, .discr, .up_word(64'd0),
    .up_valid(1'b0), .up_ready, .dn_word, .dn_valid, .dn_ready(1'b1), .drop);

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
    #2_000_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drops: a dropped string is acknowledged by the dispatcher for one cycle.
  always @(posedge clk) begin
    n_drop += $countones(dut.u_disp.drop_ack);
    if (dut.u_disp.drop_ack[0]) n_drop_s0++;
  end

  always @(posedge clk) begin
    if (dn_valid) begin
      event_word_t w;
      w = dn_word;
      n_words++;
      check(w.hdr == DATA_HDR && w.col == 4'd3 && int'(w.str) < N_STR, "data word header");
      check(w.lost == (w.lost_cnt != 0), "lost flag and count agree");
      n_lost_sum += int'(w.lost_cnt);
      if (w.pileup) n_pu_words++;
      if (w.str == 3'd0) n_words_s0++;
    end
  end

  // Exponential waiting time with the given mean, in ps.
  function automatic realtime exp_wait(input real mean_ps);
    real u;
    u = (real'($urandom) + 1.0) / 4294967297.0;
    return -mean_ps * $ln(u);
  endfunction

  task automatic pulse(input int s, input int p);
    int width;
    width = $urandom_range(2000, 8000);
    n_gen++;
    if (s == 0) n_gen_s0++;
    fork
      begin
        disc[s][p] = 1;
        #(width) disc[s][p] = 0;
      end
    join_none
  endtask

  // Poisson hits at rate_hz on the strings lo..hi; overlapping hits on one
  // pixel merge into one pulse and are not counted twice.
  task automatic run_hits(input real rate_hz, input int n, input int lo, input int hi);
    int s, p;
    for (int k = 0; k < n; k++) begin
      #(exp_wait(1.0e12 / rate_hz));
      s = $urandom_range(lo, hi);
      p = $urandom_range(0, 63);
      if (!disc[s][p]) pulse(s, p);
    end
    #100_000_000;  // drain: every TDC converted and every word out
  endtask

  task automatic check_accounting(input string phase);
    int pending;
    pending = int'(dut.u_disp.lost_cnt);
    check(n_ev == n_words + n_drop,
          $sformatf("%s: %0d events = %0d words + %0d drops", phase, n_ev, n_words, n_drop));
    check(n_lost_sum + pending == n_drop,
          $sformatf("%s: lost counts %0d + pending %0d = drops %0d", phase, n_lost_sum,
                    pending, n_drop));
    check(str_toa == '0 && !dn_valid, $sformatf("%s: column idle after drain", phase));
  endtask

  task automatic clear_counts();
    n_gen = 0; n_ev = 0; n_words = 0; n_drop = 0; n_lost_sum = 0; n_pu_words = 0;
    n_gen_s0 = 0; n_ev_s0 = 0; n_words_s0 = 0; n_drop_s0 = 0;
  endtask

  initial begin
    real eff, loss, pu_loss;
    // The first pulse clears the clocked logic and the acks; the second gives
    // the asynchronous string and TDC clears a rising edge.
    #100 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (4) @(posedge clk);

    // Phase 1: 300 kHz/cm2 over the column's 0.24 cm2.
    run_hits(72.0e3, 4000, 0, N_STR - 1);
    eff = real'(n_words) / real'(n_gen);
    $display("300 kHz/cm2: %0d hits, %0d events, %0d words, %0d drops, efficiency %0.4f",
             n_gen, n_ev, n_words, n_drop, eff);
    check(eff >= 0.94, $sformatf("efficiency %0.4f at 300 kHz/cm2", eff));
    check_accounting("300 kHz/cm2");

    // Phase 2: 5 MHz on string 0 alone.
    clear_counts();
    run_hits(5.0e6, 4000, 0, 0);
    loss = 1.0 - real'(n_words_s0) / real'(n_gen_s0);
    pu_loss = 1.0 - real'(n_ev_s0) / real'(n_gen_s0);
    $display("5 MHz string: %0d hits, %0d events (%0.4f absorbed as pile-up), %0d drops, %0d words, loss %0.4f",
             n_gen_s0, n_ev_s0, pu_loss, n_drop_s0, n_words_s0, loss);
    check(n_ev_s0 > 0 && n_drop_s0 > 0, "5 MHz: events and drops both seen");
    check(n_pu_words > 0, "5 MHz: pile-up flagged");
    check_accounting("5 MHz string");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
