`timescale 1ps/1ps
// tb_string_logic: fires pixels of a 64-pixel string in random order and
// checks the ToA latch (immediate, no clock), the latched pixel address, the
// ToT latch on the falling edge, the pile-up flag for a second pixel (during
// the pulse, after it, or in the same instant), the pixel mask, and that the
// ACK clears everything.
module tb_string_logic;
  logic [63:0] disc = '0, pix_en = '1;
  logic ack = 0, rst_n = 1, toa, tot, pileup;
  logic [5:0] addr;
  int checks = 0, failures = 0;

  string_logic dut (.disc, .pix_en, .ack, .rst_n, .toa, .tot, .pileup, .addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_ack();
    #1000 ack = 1;
    #500 ack = 0;
    #500;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, j;
    realtime t;
    #100 rst_n = 0;
    #100 rst_n = 1;
    #1000;
    #1000;
    check(!toa && !tot && !pileup, "cleared by reset");
    for (int it = 0; it < 50; it++) begin
      i = $urandom_range(0, 63);
      do j = $urandom_range(0, 63); while (j == i);
      // single hit
      disc[i] = 1;
      t = $realtime;
      #1;
      check(toa && addr == 6'(i) && !tot && !pileup, $sformatf("toa/addr for pixel %0d", i));
      #3000 disc[i] = 0;
      #1;
      check(tot && !pileup, "tot after falling edge");
      do_ack();
      check(!toa && !tot && !pileup && addr == 0, "cleared by ack");
      // second pixel during the pulse
      disc[i] = 1;
      #2000 disc[j] = 1;
      #1;
      check(pileup && addr == 6'(i), "pileup during pulse");
      #1000 disc[i] = 0;
      #1000 disc[j] = 0;
      #1;
      check(tot, "tot with pileup");
      do_ack();
      // second pixel after the first pulse ended, before ack
      disc[i] = 1;
      #2000 disc[i] = 0;
      #500 disc[j] = 1;
      #1;
      check(pileup && tot && addr == 6'(i), "pileup after pulse");
      #500 disc[j] = 0;
      do_ack();
      // simultaneous hits: lowest index latched, pile-up flagged
      disc[i] = 1;
      disc[j] = 1;
      #1;
      check(addr == 6'((i < j) ? i : j) && pileup, "simultaneous hits");
      #1000 disc = '0;
      do_ack();
      // masked pixel
      pix_en[i] = 0;
      disc[i] = 1;
      #1;
      check(!toa, "masked pixel ignored");
      #1000 disc[i] = 0;
      pix_en[i] = 1;
      // hit during ack is not latched afterwards
      ack = 1;
      disc[j] = 1;
      #500 ack = 0;
      #1;
      check(!toa, "hit held through ack not re-latched");
      #500 disc[j] = 0;
      #500;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
