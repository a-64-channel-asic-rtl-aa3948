// tofpet_top: the 64-channel TOFPET readout chip, digital view.
//
// Each channel's two discriminators (timing threshold DOT, energy threshold
// DOE) feed a channel cell holding two four-TAC analog TDC branches and the
// TDC controller; valid events are collected by the global controller,
// framed and sent on up to two LVDS links. The analog front end
// (preamplifier, post-amplifiers, discriminators, threshold and bias DACs,
// calibration injection) is outside this RTL: its discriminator outputs are
// inputs here and the DAC codes and switches it needs are outputs.
//
// Ports: clk (160 MHz), rst (synchronous, active high), SPI, external test
// pulse, dot/doe per channel, txd/txclk ([link][half] DDR bit pairs),
// front-end configuration per channel (fe_cfg), and the calibration
// injection pulse and amplitude code.
// The partition into 64 channels and a global controller follows the
// document's chip architecture; the port list is this design's own.
module tofpet_top
  import tofpet_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            spi_sclk,
  input  logic            spi_cs_n,
  input  logic            spi_mosi,
  output logic            spi_miso,
  input  logic            ext_test_pulse,
  input  logic [N_CH-1:0] dot,
  input  logic [N_CH-1:0] doe,
  output logic [1:0][1:0] txd,
  output logic [1:0]      txclk,
  output ch_cfg_t         fe_cfg [N_CH],
  output logic            cal_pulse,
  output logic [DAC_W-1:0] cal_amp
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CW-1:0]   coarse_gray;
  logic            frame_lsb;
  ch_cfg_t         ch_cfg [N_CH];
  logic [7:0]      val_win;
  logic [N_CH-1:0] ev_valid, ev_ack, darkcount;
  ch_event_t       ev [N_CH];
  logic            test_pulse;

  assign fe_cfg = ch_cfg;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    tofpet_channel u_ch (
      .clk, .rst, .cfg(ch_cfg[i]), .val_win, .coarse_gray, .frame_lsb,
      .dot(dot[i]), .doe(doe[i]), .test_pulse,
      .ev_valid(ev_valid[i]), .ev(ev[i]), .ev_ack(ev_ack[i]), .darkcount(darkcount[i]));
  end

  global_controller u_gc (
    .clk, .rst, .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .ext_test_pulse, .test_pulse, .cal_pulse, .cal_amp,
    .coarse_gray, .frame_lsb, .ch_cfg, .val_win,
    .ev_valid, .ev, .ev_ack, .darkcount, .txd, .txclk);
endmodule
