`timescale 1ps/1ps
// tb_event_buffer: feeds an event buffer with modelled TDC results that finish
// in either order and with random downstream back-pressure. Checks that no
// word is built before the slower TDC is done, that every field of the word is
// as computed here, that clr is given exactly once per event, and that a full
// buffer holds its word and leaves the next result in the TDCs.
module tb_event_buffer;
  import tof_pkg::*;
  logic clk = 0, rst_n = 1;
  logic toa_valid = 0, tot_valid = 0, meta_valid = 0, meta_pileup = 0;
  logic [5:0] meta_lost_cnt = 0;
  logic [14:0] toa_coarse = 0, tot_coarse = 0;
  logic [9:0] toa_fine = 0, tot_fine = 0;
  logic [2:0] meta_str = 0;
  logic [5:0] meta_pix = 0;
  logic clr, word_valid, word_ready = 0;
  event_word_t word;
  event_word_t expq [$];
  int checks = 0, failures = 0, n_clr = 0, n_events = 0, n_stall = 0;

  always #3125 clk = ~clk;

  event_buffer dut (.clk, .rst_n, .col_id(4'd9), .toa_valid, .toa_coarse, .toa_fine,
    .tot_valid, .tot_coarse, .tot_fine, .meta_valid, .meta_str, .meta_pix,
    .meta_pileup, .meta_lost_cnt, .clr, .word, .word_valid, .word_ready);

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

  // Modelled TDCs: clr releases both results at the clock edge.
  always @(posedge clk) begin
    if (clr) begin
      n_clr++;
      check(toa_valid && tot_valid && meta_valid, "clr only with both results");
      toa_valid <= 0;
      tot_valid <= 0;
      meta_valid <= 0;
    end
  end

  // Consumer with random ready; compare with the expected queue.
  always @(posedge clk) begin
    if (word_valid && word_ready) begin
      event_word_t e;
      e = expq.pop_front();
      check(word == e, $sformatf("word %h exp %h", word, e));
    end
    if (word_valid && !word_ready) n_stall++;
    word_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    event_word_t e;
    #100 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      while (toa_valid || tot_valid) @(negedge clk);
      toa_coarse = 15'($urandom); toa_fine = 10'($urandom);
      tot_coarse = toa_coarse + 15'($urandom_range(0, 40));
      tot_fine = 10'($urandom);
      meta_str = 3'($urandom_range(0, 5)); meta_pix = 6'($urandom);
      meta_pileup = 1'($urandom); meta_lost_cnt = ($urandom_range(0, 1) != 0) ? 6'($urandom) : 6'd0;
      e = '0;
      e.hdr = 4'hF; e.toa_fine = toa_fine; e.tot_fine = tot_fine; e.col = 4'd9;
      e.str = meta_str; e.pix = meta_pix; e.coarse = toa_coarse;
      e.dcoarse = 4'(tot_coarse - toa_coarse); e.lost = (meta_lost_cnt != 0); e.lost_cnt = meta_lost_cnt; e.pileup = meta_pileup;
      expq.push_back(e);
      meta_valid = 1;
      if (it[0]) toa_valid = 1; else tot_valid = 1;
      repeat ($urandom_range(1, 4)) begin
        @(posedge clk);
        #1;
        check(!clr, "no clr with one TDC done");
      end
      @(negedge clk);
      toa_valid = 1; tot_valid = 1;
      n_events++;
    end
    while (expq.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
    check(n_clr == n_events, $sformatf("clr count %0d events %0d", n_clr, n_events));
    check(n_stall > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
