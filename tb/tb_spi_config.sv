// tb_spi_config: a 10 MHz mode-0 SPI master writes and reads back channel
// registers, the global and test-pulse registers, reads the status word and
// a dark counter, and checks that a write to a dark counter address pulses
// the clear for that channel. Reset values are checked first.
module tb_spi_config;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  ch_cfg_t ch_cfg [N_CH];
  glb_cfg_t glb;
  tp_cfg_t tpc;
  logic [5:0] drd_ch, dclr_ch;
  logic dclr;
  logic [31:0] status = 32'hCAFE_0123;

  spi_config dut (.clk, .rst, .sclk, .cs_n, .mosi, .miso, .ch_cfg, .glb_cfg(glb), .tp_cfg(tpc),
    .status, .dark_rd_ch(drd_ch), .dark_rd_data({10'h0, drd_ch} + 16'h100),
    .dark_clr(dclr), .dark_clr_ch(dclr_ch));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int clr_seen = 0, clr_ch_seen = -1;
  always @(posedge clk) if (dclr && !rst) begin clr_seen++; clr_ch_seen = dclr_ch; end

  task automatic xfer(input bit wr, input logic [7:0] addr, input logic [31:0] wdata,
                      output logic [31:0] rdata);
    logic [47:0] w = {wr, 7'h0, addr, wdata};
    cs_n = 0; #100;
    for (int i = 47; i >= 0; i--) begin
      mosi = w[i]; #50;
      sclk = 1;
      if (i < 32) rdata[i] = miso;
      #50 sclk = 0;
    end
    #100 cs_n = 1; #200;
  endtask

  logic [31:0] r, vals [N_CH];

  initial begin
    repeat (4) @(posedge clk); rst = 0;
    xfer(0, 8'd7, 0, r);
    check(r == 32'h8000_0000, "channel reset value: enabled, sync window");
    xfer(0, A_GLOBAL, 0, r);
    check(r == 32'h0008_0001, "global reset value");
    for (int i = 0; i < N_CH; i += 9) begin
      vals[i] = $urandom;
      xfer(1, 8'(i), vals[i], r);
    end
    for (int i = 0; i < N_CH; i += 9) begin
      xfer(0, 8'(i), 0, r);
      check(r == vals[i], $sformatf("channel %0d read back", i));
      check(ch_cfg[i] == vals[i], $sformatf("channel %0d register", i));
    end
    check(ch_cfg[1] == 32'h8000_0000, "other channel untouched");
    xfer(1, A_GLOBAL, 32'h0010_0017, r);
    check(glb.tx_enable && glb.tx_2links && glb.tx_ddr && glb.raw_mode && glb.val_win == 16,
          "global fields");
    xfer(1, A_TP, 32'h5C05_0100, r);
    check(tpc.period == 16'h0100 && tpc.width == 8'h05 && tpc.cal_amp == 6'h17, "test pulse fields");
    xfer(0, A_TP, 0, r);
    check(r == 32'h5C05_0100, "test pulse read back");
    xfer(0, A_STATUS, 0, r);
    check(r == 32'hCAFE_0123, "status read");
    xfer(0, A_DARK + 8'd42, 0, r);
    check(r == 32'h0000_012A, "dark counter read");
    xfer(1, A_DARK + 8'd13, 0, r);
    check(clr_seen == 1 && clr_ch_seen == 13, "dark counter clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
