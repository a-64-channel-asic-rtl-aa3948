// tofpet_channel: the TDC part of one channel cell.
//
// The discriminator outputs DOT (timing threshold) and DOE (energy
// threshold) enter here. When the channel's test-pulse enable is set both
// are replaced by the chip test pulse, which is how the TDCs are calibrated
// without the analog front end. The timing TDC branch captures on DOT's
// rising edge, the energy branch on DOE's falling edge (DOE inverted into
// the branch model). Both branches share the TAC selection, conversion and
// discharge controls of tdc_ctrl, so TAC pair n always holds one event.
//
// The channel's tac_dac field trims both branches' conversion gain, the
// per-channel TDC calibration.
// Interface: configuration (ch_cfg_t, validation window), the global coarse
// time, the channel data register (ev_valid/ev/ev_ack) and darkcount. Timing
// is that of tdc_ctrl. The analog branches are behavioural models, so this
// module is for simulation; the controller itself is synthesizable.
// The channel structure follows the document's channel schema; the
// test-pulse multiplexer placement is this design's choice.
module tofpet_channel
  import tofpet_pkg::*;
#(
  parameter real GAIN = 125.0
) (
  input  logic          clk,
  input  logic          rst,
  input  ch_cfg_t       cfg,
  input  logic [7:0]    val_win,
  input  logic [CW-1:0] coarse_gray,
  input  logic          frame_lsb,
  input  logic          dot,
  input  logic          doe,
  input  logic          test_pulse,
  output logic          ev_valid,
  output ch_event_t     ev,
  input  logic          ev_ack,
  output logic          darkcount
);
  timeunit 1ns;
  timeprecision 1ps;

  logic             trig_t, trig_e;
  logic             arm, conv_start, clr;
  logic [TAC_W-1:0] wr_sel, conv_sel, clr_sel;
  logic             t_eoc, e_eoc;

  assign trig_t = cfg.tp_enable ? test_pulse : dot;
  assign trig_e = cfg.tp_enable ? test_pulse : doe;

  tac_adc_model #(.N_TAC(N_TAC), .GAIN(GAIN)) u_tbranch (
    .clk, .trig(trig_t), .arm, .wr_sel, .conv_start, .conv_sel, .clr, .clr_sel,
    .dac(cfg.tac_dac), .eoc(t_eoc));

  tac_adc_model #(.N_TAC(N_TAC), .GAIN(GAIN)) u_ebranch (
    .clk, .trig(~trig_e), .arm, .wr_sel, .conv_start, .conv_sel, .clr, .clr_sel,
    .dac(cfg.tac_dac), .eoc(e_eoc));

  tdc_ctrl u_ctrl (
    .clk, .rst, .enable(cfg.ch_enable), .val_mode(cfg.val_mode), .val_win,
    .coarse_gray, .frame_lsb, .dot(trig_t), .doe(trig_e),
    .arm, .wr_sel, .conv_start, .conv_sel, .clr, .clr_sel,
    .t_eoc_in(t_eoc), .e_eoc_in(e_eoc),
    .ev_valid, .ev, .ev_ack, .darkcount);
endmodule
