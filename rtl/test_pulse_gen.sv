// test_pulse_gen: chip test pulse for TDC calibration and charge injection.
//
// The internal generator repeats a pulse every `period` clock cycles that
// stays high for `width` cycles (period 0 or enable low: no pulse). With
// use_ext set the external LVDS test pulse is forwarded instead, untouched
// and asynchronous, so the board can sweep its phase against the clock to
// measure the TDC's linearity.
//
// Timing: the internal pulse is registered and starts one cycle after
// enable; each pulse rises at counter value 0 of a period. That the test
// pulse comes from the global controller or from outside follows the
// document; the period/width programming is this design's choice.
module test_pulse_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        use_ext,
  input  logic [15:0] period,
  input  logic [7:0]  width,
  input  logic        ext_pulse,
  output logic        tp
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [15:0] cnt;
  logic        tp_int;

  always_ff @(posedge clk) begin
    if (rst || !enable || period == '0) begin
      cnt    <= '0;
      tp_int <= 1'b0;
    end else begin
      cnt    <= (cnt >= period - 1'b1) ? '0 : cnt + 1'b1;
      tp_int <= (cnt < 16'(width));
    end
  end

  assign tp = use_ext ? ext_pulse : tp_int;
endmodule
