// tac_adc_model: BEHAVIOURAL MODEL (not synthesizable) of one analog TDC
// branch: four time-to-analogue converters (TACs) and the ADC they share.
//
// In the chip each branch (timing or energy) has four TACs, a quad buffer
// that de-randomises the event rate. An armed TAC starts charging at the
// trigger edge and stops at a clock edge; its voltage is later converted by
// discharging it with a current GAIN times smaller than the charging current,
// so the conversion lasts GAIN times the charge time. The ADC's comparator
// output marks the end of that ramp; the digital controller counts the
// conversion on the coarse clock. With GAIN = 125 and a 6.25 ns clock one
// coarse count of conversion is 50 ps of trigger phase.
//
// Model behaviour:
//   - trig rising while arm is high captures the time into TAC wr_sel, once;
//     later edges are ignored until that TAC is cleared.
//   - the TAC stops charging at the second rising clk edge after the trigger,
//     so the charge time lies in (1, 2] clock periods and is never tiny.
//   - conv_start (sampled on clk) starts converting TAC conv_sel: eoc drops
//     and rises again GAIN x charge time later. eoc is high when idle.
//   - clr (sampled on clk) discharges TAC clr_sel and makes it writable.
//   - dac trims the charge/discharge current ratio, as the per-channel TAC
//     calibration DAC does: the conversion lasts GAIN x (1 + dac/256) times
//     the charge time, dac read as a signed 6-bit code (-32..31, 0 nominal).
// The four-TAC buffer, the interpolation by time multiplication and the
// ramp ADC and the calibration of the conversion range by a per-channel DAC
// follow the document; the stop at the second edge, GAIN = 125, the DAC
// step of 1/256 and the eoc polarity are this model's choices.
module tac_adc_model #(
  parameter int unsigned N_TAC = 4,
  parameter real         GAIN  = 125.0
) (
  input  logic                     clk,
  input  logic                     trig,       // discriminator output (asynchronous)
  input  logic                     arm,        // TAC wr_sel may capture
  input  logic [$clog2(N_TAC)-1:0] wr_sel,
  input  logic                     conv_start,
  input  logic [$clog2(N_TAC)-1:0] conv_sel,
  input  logic                     clr,
  input  logic [$clog2(N_TAC)-1:0] clr_sel,
  input  logic [5:0]               dac,        // discharge current trim, two's complement
  output logic                     eoc         // comparator: 0 while converting
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime t_start  [N_TAC];
  realtime q        [N_TAC];
  bit      captured [N_TAC];
  bit      charging [N_TAC];
  int      edges    [N_TAC];
  realtime conv_len;

  initial begin
    eoc = 1'b1;
    conv_len = 0.0;
    for (int i = 0; i < N_TAC; i++) begin
      captured[i] = 1'b0;
      charging[i] = 1'b0;
      edges[i]    = 0;
      q[i]        = 0.0;
      t_start[i]  = 0.0;
    end
  end

  always @(posedge trig) begin
    if (arm && !captured[wr_sel]) begin
      captured[wr_sel] = 1'b1;
      charging[wr_sel] = 1'b1;
      edges[wr_sel]    = 0;
      t_start[wr_sel]  = $realtime;
    end
  end

  always @(posedge clk) begin
    for (int i = 0; i < N_TAC; i++) begin
      if (charging[i]) begin
        edges[i] = edges[i] + 1;
        if (edges[i] == 2) begin
          charging[i] = 1'b0;
          q[i] = $realtime - t_start[i];
        end
      end
    end
    if (clr) begin
      captured[clr_sel] = 1'b0;
      charging[clr_sel] = 1'b0;
      q[clr_sel]        = 0.0;
    end
    if (conv_start) begin
      conv_len = q[conv_sel] * GAIN * (1.0 + real'($signed(dac)) / 256.0) + 0.001;
      eoc <= 1'b0;
    end
  end

  always @(negedge eoc) begin
    #(conv_len) eoc <= 1'b1;
  end
endmodule
