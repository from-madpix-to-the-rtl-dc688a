`timescale 1ps/1ps
// tb_tdc_ctrl: drives one TDC channel with triggers at random sub-clock
// offsets, with the behavioural TAC model closing the loop, and checks the
// coarse and fine time against values computed from the trigger time, the
// conversion latency (fine+1 cycles after the stop edge), that both stop-edge
// cases (T0 early and after the clock falling edge) occur, and that a
// disabled channel ignores its trigger.
module tb_tdc_ctrl;
  localparam realtime TCLK = 6250;
  logic clk = 0, rst_n = 1, en = 1, trig = 0, clr = 0;
  logic [14:0] coarse_in = 0;
  logic discr, hit, framp, sramp, busy, valid;
  logic [14:0] coarse;
  logic [9:0] fine;
  int checks = 0, failures = 0, n_before = 0, n_after = 0;

  always #3125 clk = ~clk;
  always @(posedge clk) coarse_in <= coarse_in + 1'b1;

  tdc_ctrl dut (.clk, .rst_n, .en, .trig, .discr, .coarse_in, .clr, .hit,
                .framp, .sramp, .busy, .valid, .coarse, .fine);
  tac_model u_tac (.clk, .framp, .sramp, .discr);

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

  initial begin
    realtime t0, t_edge, t_stop;
    int k, exp_fine, exp_coarse, cycles;
    bit early;
    // Two reset pulses: the second gives the trigger latch a clean rising
    // edge of its clear once the re-arm strobe has settled.
    #100 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk) rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int it = 0; it < 40; it++) begin
      @(negedge clk);
      #($urandom_range(100, 6100));
      t0 = $realtime;
      // posedges at 3125 + k*TCLK
      k = int'($floor((t0 - 3125) / TCLK)) + 1;
      t_edge = 3125 + k * TCLK;
      early = ((t0 - (t_edge - TCLK)) < TCLK / 2);
      t_stop = early ? t_edge : t_edge + TCLK;
      exp_coarse = early ? k : k + 1;
      exp_fine = int'((t_stop - t0) / 10.0);
      if (early) n_before++; else n_after++;
      trig = 1;
      #2000 trig = 0;
      cycles = 0;
      while (!valid) begin
        @(posedge clk);
        #1;
        cycles++;
      end
      check(fine == 10'(exp_fine), $sformatf("fine %0d exp %0d (t0=%0t)", fine, exp_fine, t0));
      check(coarse == 15'(exp_coarse), $sformatf("coarse %0d exp %0d", coarse, exp_coarse));
      // valid appears fine+1 edges after the stop edge
      check(($realtime - 1 - t_stop) / TCLK == real'(exp_fine + 1),
            $sformatf("latency %0t after stop, fine %0d", $realtime - t_stop, exp_fine));
      check(exp_fine >= 312 && exp_fine <= 938, "interval within 3.1..9.4 ns");
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      repeat (3) @(posedge clk);
      check(!busy && !valid, "re-armed after clr");
    end
    // disabled channel
    en = 0;
    @(negedge clk);
    trig = 1;
    #2000 trig = 0;
    repeat (5) @(posedge clk);
    check(!hit && !busy, "disabled channel ignores trigger");
    check(n_before > 0, "T0 before falling edge case seen");
    check(n_after > 0, "T0 after falling edge case seen");
    $display("cases: early=%0d after=%0d", n_before, n_after);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
