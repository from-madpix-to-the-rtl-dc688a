`timescale 1ps/1ps
// tb_eoc_chain_stage: three sources (upstream and two local buffers) offer
// tagged words at random; the downstream side takes them with random
// back-pressure. Checks that every word arrives once, in order per source,
// that no source waits more than two grants of the others while it is
// valid (round robin), and that a word reaches the output one clock after it
// is taken.
module tb_eoc_chain_stage;
  localparam int NL = 2, NS = 3;
  logic clk = 0, rst_n = 1;
  logic [63:0] up_word;
  logic up_valid, up_ready;
  logic [NL-1:0][63:0] loc_word;
  logic [NL-1:0] loc_valid, loc_ready;
  logic [63:0] dn_word;
  logic dn_valid, dn_ready = 0;
  int checks = 0, failures = 0;
  int sent [NS], recv [NS], waits [NS];
  logic [NS-1:0] v;
  logic [NS-1:0] r;
  logic [NS-1:0][63:0] w;
  logic [63:0] last_taken;
  logic took;

  always #3125 clk = ~clk;

  eoc_chain_stage dut (.clk, .rst_n, .up_word, .up_valid, .up_ready, .loc_word, .loc_valid,
    .loc_ready, .dn_word, .dn_valid, .dn_ready);

  assign up_valid = v[0];
  assign loc_valid = v[2:1];
  assign up_word = w[0];
  assign loc_word = {w[2], w[1]};
  assign r = {loc_ready, up_ready};

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

  always @(posedge clk) begin
    if (rst_n) begin
      // one clock latency
      if (took) check(dn_valid && dn_word == last_taken, "taken word on output next cycle");
      took = 0;
      for (int s = 0; s < NS; s++) begin
        if (v[s] && r[s]) begin
          took = 1;
          last_taken = w[s];
          sent[s]++;
          waits[s] = 0;
        end else if (v[s] && (r != 0)) begin
          waits[s]++;
          check(waits[s] <= 2, "round robin fairness");
        end
      end
      if (dn_valid && dn_ready) begin
        int s;
        s = int'(dn_word[63:56]);
        check(s < NS && dn_word[31:0] == 32'(recv[s]), $sformatf("order src %0d", s));
        if (s < NS) recv[s]++;
      end
    end
  end

  initial begin
    took = 0;
    for (int s = 0; s < NS; s++) begin sent[s] = 0; recv[s] = 0; waits[s] = 0; end
    v = '0; w = '0;
    #100 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      dn_ready = ($urandom_range(0, 2) != 0);
      for (int s = 0; s < NS; s++)
        if (!v[s] && $urandom_range(0, 1)) begin
          v[s] = 1;
          w[s] = {8'(s), 24'h0, 32'(sent[s])};
        end
    end
    v = '0;
    dn_ready = 1;
    repeat (5) @(posedge clk);
    for (int s = 0; s < NS; s++)
      check(recv[s] == sent[s] && sent[s] > 100, $sformatf("src %0d sent %0d recv %0d", s, sent[s], recv[s]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a source drops valid only after its word was taken
  always @(posedge clk) begin
    for (int s = 0; s < NS; s++)
      if (v[s] && r[s]) v[s] <= 0;
  end
endmodule
