`timescale 1ps/1ps
// tb_sram_fifo: random pushes and pops against a queue model of the 32-word
// FIFO. Checks the head word, the fill level, that the FIFO reports full after
// exactly 32 words, and that a word written into an empty FIFO is readable on
// the next clock.
module tb_sram_fifo;
  logic clk = 0, rst_n = 1;
  logic [63:0] in_word = 0, out_word;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [5:0] level;
  logic [63:0] q [$];
  int checks = 0, failures = 0, n_full = 0;

  always #3125 clk = ~clk;

  sram_fifo dut (.clk, .rst_n, .in_word, .in_valid, .in_ready, .out_word, .out_valid,
                 .out_ready, .level);

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
      check(level == 6'(q.size()), $sformatf("level %0d model %0d", level, q.size()));
      check(in_ready == (q.size() < 32), "full flag");
      check(out_valid == (q.size() > 0), "empty flag");
      if (q.size() > 0) check(out_word == q[0], "head word");
      if (q.size() == 32) n_full++;
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_word);
    end
  end

  initial begin
    #100 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // phases: fill, drain, mixed
      if (cyc % 400 < 120)      begin in_valid = 1; out_ready = ($urandom_range(0, 7) == 0); end
      else if (cyc % 400 < 240) begin in_valid = ($urandom_range(0, 7) == 0); out_ready = 1; end
      else                      begin in_valid = $urandom_range(0, 1); out_ready = $urandom_range(0, 1); end
      in_word = {$urandom, $urandom};
    end
    check(n_full > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
