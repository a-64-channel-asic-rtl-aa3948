// global_controller: back end shared by the 64 channels.
//
// It distributes the gray coarse time and frame parity to the channels,
// holds their configuration (written over SPI), generates the test pulse,
// counts each channel's dark pulses, collects valid events round-robin,
// processes them (or passes them raw), frames them per coarse-counter turn
// and serialises the frames onto the LVDS data links.
//
//   channels -> readout_arbiter -> event_processor -> frame_builder
//            -> tx_serializer -> txd/txclk
//   coarse_counter -> channels, frame_builder
//   spi_config <-> registers, dark_counters, status
//   test_pulse_gen -> channels (TDC test pulse) and calibration injection
//
// Status word (SPI address 0x82): {frames_dropped[7:0], 4'b0, frame_num}.
// Timing: everything runs on the one system clock except the SPI pins and
// the external test pulse, which are asynchronous.
// The list of functions follows the document's description of the global
// controller; how they are split and connected is this design's own.
module global_controller
  import tofpet_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // SPI configuration
  input  logic            spi_sclk,
  input  logic            spi_cs_n,
  input  logic            spi_mosi,
  output logic            spi_miso,
  // test pulse
  input  logic            ext_test_pulse,
  output logic            test_pulse,
  output logic            cal_pulse,
  output logic [DAC_W-1:0] cal_amp,
  // to and from the channels
  output logic [CW-1:0]   coarse_gray,
  output logic            frame_lsb,
  output ch_cfg_t         ch_cfg [N_CH],
  output logic [7:0]      val_win,
  input  logic [N_CH-1:0] ev_valid,
  input  ch_event_t       ev [N_CH],
  output logic [N_CH-1:0] ev_ack,
  input  logic [N_CH-1:0] darkcount,
  // data links
  output logic [1:0][1:0] txd,
  output logic [1:0]      txclk
);
  timeunit 1ns;
  timeprecision 1ps;

  glb_cfg_t        glb;
  tp_cfg_t         tpc;
  logic [CW-1:0]   coarse_bin;
  logic [FW-1:0]   frame_num;
  logic            frame_start;
  logic [CH_W-1:0] dark_rd_ch, dark_clr_ch;
  logic [15:0]     dark_rd_data;
  logic            dark_clr;
  logic [7:0]      frames_dropped;

  logic            a_valid, a_ready;
  logic [CH_W-1:0] a_ch;
  ch_event_t       a_ev;
  logic            p_valid, p_ready, p_two;
  logic [SLOT_W-1:0] p_s0, p_s1;
  logic            f_valid, f_ready;
  logic [SLOT_W-1:0] f_slot;
  logic [2:0]      bpc;
  logic            any_cal;

  coarse_counter #(.CW(CW), .FW(FW)) u_cnt (
    .clk, .rst, .coarse_bin, .coarse_gray, .frame_num, .frame_lsb, .frame_start);

  spi_config u_spi (
    .clk, .rst, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .ch_cfg, .glb_cfg(glb), .tp_cfg(tpc),
    .status({frames_dropped, 4'h0, frame_num}),
    .dark_rd_ch, .dark_rd_data, .dark_clr, .dark_clr_ch);

  dark_counters #(.N(N_CH), .W(16)) u_dark (
    .clk, .rst, .darkcount, .clear_en(dark_clr), .clear_ch(dark_clr_ch),
    .rd_ch(dark_rd_ch), .rd_data(dark_rd_data));

  test_pulse_gen u_tp (
    .clk, .rst, .enable(1'b1), .use_ext(glb.tp_ext), .period(tpc.period),
    .width(tpc.width), .ext_pulse(ext_test_pulse), .tp(test_pulse));

  always_comb begin
    any_cal = 1'b0;
    for (int i = 0; i < N_CH; i++) any_cal |= ch_cfg[i].cal_enable;
  end
  assign cal_pulse = test_pulse && any_cal;
  assign cal_amp   = tpc.cal_amp;
  assign val_win   = glb.val_win;

  readout_arbiter #(.N(N_CH)) u_arb (
    .clk, .rst, .req(ev_valid), .ev_in(ev), .ack(ev_ack),
    .out_valid(a_valid), .out_ready(a_ready), .out_ch(a_ch), .out_ev(a_ev));

  event_processor u_proc (
    .clk, .rst, .raw_mode(glb.raw_mode),
    .in_valid(a_valid), .in_ready(a_ready), .in_ch(a_ch), .in_ev(a_ev),
    .out_valid(p_valid), .out_ready(p_ready), .out_two(p_two), .out_s0(p_s0), .out_s1(p_s1));

  assign bpc = (glb.tx_2links ? 3'd2 : 3'd1) << glb.tx_ddr;

  frame_builder u_frame (
    .clk, .rst, .frame_start, .frame_num, .raw_mode(glb.raw_mode), .bits_per_cycle(bpc),
    .in_valid(p_valid), .in_ready(p_ready), .in_two(p_two), .in_s0(p_s0), .in_s1(p_s1),
    .out_valid(f_valid), .out_ready(f_ready), .out_slot(f_slot), .frames_dropped);

  tx_serializer u_tx (
    .clk, .rst, .enable(glb.tx_enable), .two_links(glb.tx_2links), .ddr(glb.tx_ddr),
    .train(glb.tx_train), .clk_en(glb.tx_clk_en),
    .in_valid(f_valid), .in_ready(f_ready), .in_slot(f_slot), .txd, .txclk);
endmodule
