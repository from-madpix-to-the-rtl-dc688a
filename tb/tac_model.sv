`timescale 1ps/1ps
// tac_model: behavioural model of the analog part of one TDC channel (the
// time-to-amplitude converter and Wilkinson comparator), for simulation only.
// The fast ramp charges for as long as framp is high; the slow ramp then
// discharges over n clock cycles, n being the charged interval in BIN_PS bins
// (rounded), after which discr goes high until sramp is released. Real
// current sources, capacitors and comparator offsets are not modelled.
module tac_model #(
  parameter real BIN_PS = 10.0
) (
  input  logic clk,
  input  logic framp,
  input  logic sramp,
  output logic discr
);
  realtime t_start;
  int      n;
  int      cnt;

  initial begin
    t_start = 0;
    n       = 0;
    cnt     = 0;
  end

  always @(posedge framp) t_start = $realtime;
  always @(negedge framp) n = int'(($realtime - t_start) / BIN_PS);

  always @(posedge clk) begin
    if (sramp) cnt <= cnt + 1;
    else       cnt <= 0;
  end

  assign discr = sramp && (cnt >= n);
endmodule
