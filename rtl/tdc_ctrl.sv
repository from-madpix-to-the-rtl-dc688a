`timescale 1ps/1ps
// tdc_ctrl: digital control of one Alcor-style TDC channel (time-to-amplitude
// conversion followed by a Wilkinson ADC).
//
// An enabled rising edge on trig (T0) asynchronously sets the hit latch, which
// opens the fast ramp (framp) of the analog TAC, and samples the clock level.
// If the clock was high, T0 came before the clock falling edge and the ramp is
// stopped at the next rising edge; if it was low, T0 came after the falling
// edge and the ramp runs to the second rising edge, so the charged interval is
// always between half a period and one and a half periods (3.1-9.4 ns at
// 160 MHz). At the stop edge the coarse timestamp is captured and the slow
// ramp (sramp) starts; the fine counter then counts clock cycles until the
// comparator (discr) trips, giving the fine time in 10 ps bins (10 bits). The
// result is held with valid high until clr, which re-arms the channel.
//
// Timing of a result: T0 = t(stop edge) - fine * bin, where coarse is the
// timestamp counter value sampled by the stop edge. The choice of stop edge
// from the clock phase, the 10-bit Wilkinson conversion and the trigger/clock/
// enable interface follow the design; counting on the system clock, the
// saturation at 2^FW-1 and the clr handshake are this design's choices.
module tdc_ctrl #(
  parameter int unsigned CW = 15,
  parameter int unsigned FW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,       // channel armed
  input  logic          trig,     // asynchronous trigger (T0 on rising edge)
  input  logic          discr,    // TAC comparator, high when the slow ramp has discharged
  input  logic [CW-1:0] coarse_in,
  input  logic          clr,      // result consumed, re-arm
  output logic          hit,      // trigger latched (asynchronous)
  output logic          framp,
  output logic          sramp,
  output logic          busy,
  output logic          valid,
  output logic [CW-1:0] coarse,
  output logic [FW-1:0] fine
);
  typedef enum logic [2:0] {S_IDLE, S_CHARGE, S_CONVERT, S_DONE, S_REARM} state_t;

  state_t        state;
  logic          phase;     // clock level at T0: 1 = before the falling edge
  logic          rearm;
  logic          stopped;
  logic [FW-1:0] cnt;

  // Trigger latch: asynchronous set by T0, cleared on re-arm or reset.
  logic trig_clr;
  assign trig_clr = rearm || !rst_n;

  always_ff @(posedge trig or posedge trig_clr) begin
    if (trig_clr) begin
      hit   <= 1'b0;
      phase <= 1'b0;
    end else if (en && !hit) begin
      hit   <= 1'b1;
      phase <= clk;
    end
  end

  assign framp = hit && !stopped;
  assign sramp = (state == S_CONVERT);
  assign valid = (state == S_DONE);
  assign busy  = hit || (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_REARM;
      rearm   <= 1'b1;
      stopped <= 1'b0;
      cnt     <= '0;
      coarse  <= '0;
      fine    <= '0;
    end else begin
      rearm <= 1'b0;
      unique case (state)
        S_IDLE: if (hit) begin
          // First rising edge after T0.
          if (phase) begin
            stopped <= 1'b1;
            coarse  <= coarse_in;
            cnt     <= '0;
            state   <= S_CONVERT;
          end else begin
            state   <= S_CHARGE;
          end
        end
        S_CHARGE: begin
          // Second rising edge after T0.
          stopped <= 1'b1;
          coarse  <= coarse_in;
          cnt     <= '0;
          state   <= S_CONVERT;
        end
        S_CONVERT: begin
          if (discr || cnt == '1) begin
            fine  <= cnt;
            state <= S_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DONE: if (clr) begin
          rearm <= 1'b1;
          state <= S_REARM;
        end
        S_REARM: begin
          stopped <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
