`timescale 1ps/1ps
// tb_data_tx_block: two transmission blocks wired as neighbours. Words are
// pushed into both FIFOs at random; the serial outputs are deserialised here,
// 64 clocks per word, and parsed as frames. Checks: comma words when idle,
// open-frame words with consecutive frame numbers, data words identical and in
// order per source, at most FRAME_MAX data words per frame, close-frame words
// carrying the count, the link rate of one bit per clock, and, in the
// sharing phase, that block 1's link is disabled while its words travel on
// block 0's link.
module tb_data_tx_block;
  import tof_pkg::*;
  localparam int FMAX = 32;
  logic clk = 0, rst_n = 1, share = 0;
  logic [1:0][63:0] in_word, head_word;
  logic [1:0] in_valid = '0, in_ready, head_valid, head_ready, tx_data, tx_en;
  logic [63:0] nb_word0;
  logic nb_valid0, nb_ready0, nb_ready1;
  logic [31:0] frames0, frames1;
  logic [5:0] lvl0, lvl1;
  int checks = 0, failures = 0;
  logic [63:0] exp0 [$], exp1 [$];
  int sent [2];
  int n_frames = 0, n_commas = 0, n_data = 0, n_shared = 0, n_split = 0;

  always #3125 clk = ~clk;

  data_tx_block u0 (.clk, .rst_n, .share_en(share), .lend_en(1'b0),
    .in_word(in_word[0]), .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .nb_word(head_word[1]), .nb_valid(head_valid[1]), .nb_ready(nb_ready0),
    .head_word(head_word[0]), .head_valid(head_valid[0]), .head_ready(1'b0),
    .tx_data(tx_data[0]), .tx_en(tx_en[0]), .frames_sent(frames0), .fifo_level(lvl0));
  data_tx_block u1 (.clk, .rst_n, .share_en(1'b0), .lend_en(share),
    .in_word(in_word[1]), .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .nb_word(64'h0), .nb_valid(1'b0), .nb_ready(nb_ready1),
    .head_word(head_word[1]), .head_valid(head_valid[1]), .head_ready(nb_ready0),
    .tx_data(tx_data[1]), .tx_en(tx_en[1]), .frames_sent(frames1), .fifo_level(lvl1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Deserialisers and frame parsers, one per link.
  for (genvar l = 0; l < 2; l++) begin : g_rx
    logic [63:0] sh;
    int nbit = 0, fno = 0, cnt = 0;
    bit in_frame = 0;
    always @(posedge clk) begin
      if (rst_n) begin
        sh = {sh[62:0], tx_data[l]};
        nbit++;
        if (nbit == 64) begin
          nbit = 0;
          if (!tx_en[l]) begin
            // disabled link: nothing to parse
          end else if (!in_frame) begin
            if (sh == COMMA) n_commas++;
            else begin
              check(sh[63:48] == OPEN_HDR && sh[47:0] == 48'(fno),
                    $sformatf("link %0d open frame %h exp no %0d", l, sh, fno));
              in_frame = 1;
              cnt = 0;
            end
          end else if (sh[63:48] == CLOSE_HDR) begin
            check(sh[47:0] == 48'(cnt) && cnt > 0 && cnt <= FMAX,
                  $sformatf("link %0d close frame %h count %0d", l, sh, cnt));
            if (cnt == FMAX) n_split++;
            in_frame = 0;
            fno++;
            n_frames++;
          end else begin
            logic [63:0] e;
            cnt++;
            n_data++;
            if (sh[55:48] == 8'd1) begin
              check(exp1.size() > 0, "unexpected word of block 1");
              e = exp1.pop_front();
              if (l == 0) n_shared++;
            end else begin
              check(exp0.size() > 0 && l == 0, "unexpected word of block 0");
              e = exp0.pop_front();
            end
            check(sh == e, $sformatf("link %0d data %h exp %h", l, sh, e));
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int b = 0; b < 2; b++)
      if (in_valid[b] && in_ready[b]) begin
        if (b == 0) exp0.push_back(in_word[b]); else exp1.push_back(in_word[b]);
        sent[b]++;
      end
  end

  task automatic run_phase(input int cycles, input int rate);
    for (int cyc = 0; cyc < cycles; cyc++) begin
      @(negedge clk);
      for (int b = 0; b < 2; b++) begin
        in_valid[b] = ($urandom_range(0, rate) == 0);
        in_word[b]  = {4'hF, 4'h0, 8'(b), 16'(sent[b]), 32'($urandom)};
      end
    end
    in_valid = '0;
    repeat (64 * 80) @(posedge clk);
  endtask

  initial begin
    sent[0] = 0; sent[1] = 0;
    #100 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_phase(64 * 60, 40);   // light load, separate links
    check(tx_en == 2'b11, "both links enabled");
    @(negedge clk) share = 1;
    run_phase(64 * 60, 150);  // shared link
    check(tx_en == 2'b01, "block 1 link disabled while lending");
    run_phase(64 * 60, 30);   // heavy bursts: FIFO near full, frames split
    check(exp0.size() == 0 && exp1.size() == 0, "all words delivered");
    check(n_commas > 0, "idle commas seen");
    check(n_frames > 3, "frames seen");
    check(n_shared > 0, "shared words carried by link 0");
    check(n_split > 0, "frame closed at FRAME_MAX");
    $display("frames=%0d data=%0d shared=%0d split=%0d", n_frames, n_data, n_shared, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
