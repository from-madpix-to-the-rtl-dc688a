`timescale 1ps/1ps
// tb_tdc_dispatch: six modelled strings and two modelled TDC pairs around the
// dispatcher. Checks that a firing string triggers the armed pair in the same
// instant, that the ToT line reaches that pair's ToT channel, that the ACK goes
// back to the right string only after the ToT hit, that the metadata (string,
// pixel, pile-up) are handed over, that a second string while pair 0 is busy
// goes to pair 1, and that a third one with both pairs busy is dropped, acked
// and reported as lost in the next event.
module tb_tdc_dispatch;
  localparam int NS = 6, NP = 2;
  logic clk = 0, rst_n = 1;
  logic [NS-1:0] str_toa = '0, str_tot = '0, str_pileup = '0, str_ack;
  logic [NS-1:0][5:0] str_addr = '0;
  logic [NP-1:0] toa_trig, tot_trig, toa_hit = '0, tot_hit = '0, toa_busy = '0, tot_busy = '0;
  logic [NP-1:0] meta_valid, meta_pileup;
  logic [NP-1:0][5:0] meta_lost_cnt;
  logic [NP-1:0][2:0] meta_str;
  logic [NP-1:0][5:0] meta_pix;
  logic drop;
  int checks = 0, failures = 0;
  realtime t_trig [NP];

  always #3125 clk = ~clk;

  tdc_dispatch dut (.clk, .rst_n, .str_toa, .str_tot, .str_addr, .str_pileup, .str_ack,
    .toa_trig, .tot_trig, .toa_hit, .tot_hit, .toa_busy, .tot_busy,
    .meta_valid, .meta_str, .meta_pix, .meta_pileup, .meta_lost_cnt, .drop);

  // Modelled TDC channels: latch on the trigger edge, stay busy until released.
  for (genvar p = 0; p < NP; p++) begin : g_tdc
    always @(posedge toa_trig[p]) if (!toa_hit[p]) begin
      toa_hit[p] = 1; toa_busy[p] = 1; t_trig[p] = $realtime;
    end
    always @(posedge tot_trig[p]) if (!tot_hit[p]) begin
      tot_hit[p] = 1; tot_busy[p] = 1;
    end
  end
  // Modelled strings: the ACK clears them.
  always @(posedge clk or str_ack) begin
    for (int s = 0; s < NS; s++)
      if (str_ack[s]) begin
        str_toa[s] = 0; str_tot[s] = 0; str_pileup[s] = 0;
      end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic release_pair(input int p);
    @(negedge clk);
    toa_hit[p] = 0; tot_hit[p] = 0; toa_busy[p] = 0; tot_busy[p] = 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, c;
    realtime t;
    #100 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int it = 0; it < 30; it++) begin
      a = $urandom_range(0, NS - 1);
      do b = $urandom_range(0, NS - 1); while (b == a);
      do c = $urandom_range(0, NS - 1); while (c == a || c == b);
      // string a -> pair 0
      @(negedge clk);
      #($urandom_range(0, 2000));
      str_addr[a] = 6'($urandom); str_pileup[a] = it[0];
      str_toa[a] = 1;
      t = $realtime;
      #1;
      check(toa_hit[0] && t_trig[0] == t, "pair 0 triggered at the string edge");
      repeat (3) @(posedge clk);
      #1;
      check(!str_ack[a] && str_toa[a], "no ack before ToT");
      str_tot[a] = 1;
      #1;
      check(tot_hit[0] && !tot_hit[1], "ToT routed to pair 0");
      repeat (3) @(posedge clk);
      #1;
      check(!str_toa[a], "string a acknowledged");
      check(meta_valid[0] && meta_str[0] == 3'(a) && meta_pix[0] == str_addr[a]
            && meta_pileup[0] == it[0], $sformatf("pair 0 metadata v=%b s=%0d a=%0d pu=%b", meta_valid[0], meta_str[0], a, meta_pileup[0]));
      check(meta_lost_cnt[0] == ((it != 0) ? 6'd1 : 6'd0), "lost count from previous round");
      // string b while pair 0 busy -> pair 1
      @(negedge clk);
      str_addr[b] = 6'($urandom);
      str_toa[b] = 1;
      t = $realtime;
      #1;
      check(toa_hit[1] && t_trig[1] == t, "pair 1 triggered");
      #1000 str_tot[b] = 1;
      repeat (3) @(posedge clk);
      #1;
      check(!str_toa[b] && meta_valid[1] && meta_str[1] == 3'(b) && meta_pix[1] == str_addr[b],
            $sformatf("pair 1 metadata and ack toa=%b mv=%b str=%0d b=%0d pix=%0d exp=%0d", str_toa[b], meta_valid[1], meta_str[1], b, meta_pix[1], str_addr[b]));
      check(meta_lost_cnt[1] == 0, "no lost count on pair 1");
      // string c with both busy -> dropped
      @(negedge clk);
      str_toa[c] = 1;
      #1;
      check(drop, "drop flagged with both pairs busy");
      repeat (3) @(posedge clk);
      #1;
      check(!str_toa[c], "dropped string acknowledged");
      check(toa_hit == 2'b11, "no extra trigger");
      release_pair(0);
      release_pair(1);
      check(!meta_valid[0] && !meta_valid[1], "pairs free again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
