`timescale 1ps/1ps
// tb_string_config: sends SPI packets in all four addressing modes to a
// string receiver placed at column 5, string 3, and checks every pixel's
// threshold trim and enable against a reference copy kept by the testbench.
// Packets addressed elsewhere must change nothing; two packets in one cs_n
// frame must both be applied.
module tb_string_config;
  logic rst_n = 1, sck = 0, mosi = 0, cs_n = 0;
  logic [63:0][5:0] thr_trim;
  logic [63:0] pix_en;
  logic [5:0] ref_trim [64];
  logic       ref_en [64];
  int checks = 0, failures = 0;
  int n_mode[4] = '{0, 0, 0, 0};

  string_config dut (.rst_n, .sck, .mosi, .cs_n, .col_id(4'd5), .str_id(3'd3),
                     .thr_trim, .pix_en);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send_bits(input logic [31:0] pkt);
    for (int b = 31; b >= 0; b--) begin
      mosi = pkt[b];
      #5000 sck = 1;
      #5000 sck = 0;
    end
  endtask

  function automatic void model(input logic [31:0] pkt);
    for (int i = 0; i < 64; i++) begin
      bit sel;
      case (pkt[31:30])
        2'd0: sel = pkt[29:26] == 5 && pkt[25:23] == 3 && pkt[22:17] == 6'(i);
        2'd1: sel = pkt[29:26] == 5 && pkt[25:23] == 3;
        2'd2: sel = pkt[29:26] == 5;
        default: sel = 1;
      endcase
      if (sel) begin
        ref_trim[i] = pkt[5:0];
        ref_en[i]   = pkt[7];
      end
    end
  endfunction

  task automatic compare(input string what);
    bit ok = 1;
    for (int i = 0; i < 64; i++)
      if (thr_trim[i] != ref_trim[i] || pix_en[i] != ref_en[i]) ok = 0;
    check(ok, what);
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pkt, pkt2;
    for (int i = 0; i < 64; i++) begin
      ref_trim[i] = 0;
      ref_en[i] = 1;
    end
    #1000 rst_n = 0;
    #10000 rst_n = 1;
    cs_n = 1;
    #10000;
    compare("reset values");
    for (int it = 0; it < 200; it++) begin
      pkt = $urandom;
      // bias addresses towards this string so that most packets hit it
      if ($urandom_range(0, 3) != 0) pkt[29:23] = {4'd5, 3'd3};
      n_mode[pkt[31:30]]++;
      #5000 cs_n = 0;
      send_bits(pkt);
      model(pkt);
      if (it % 5 == 0) begin
        pkt2 = $urandom;
        pkt2[29:23] = {4'd5, 3'd3};
        send_bits(pkt2);
        model(pkt2);
      end
      #5000 cs_n = 1;
      #5000;
      compare($sformatf("after packet %08h", pkt));
    end
    // a partial packet must not write
    #5000 cs_n = 0;
    for (int b = 0; b < 20; b++) begin
      mosi = 1;
      #5000 sck = 1;
      #5000 sck = 0;
    end
    #5000 cs_n = 1;
    compare("partial packet ignored");
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d exercised", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
