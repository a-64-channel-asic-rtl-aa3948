// spi_config: SPI configuration slave and register file.
//
// A 10 MHz SPI link (mode 0: data sampled on SCLK rising, shifted out on
// SCLK falling, CS active low) reads and writes the chip configuration. The
// slave runs on the 160 MHz system clock and oversamples SCLK, MOSI and
// CS_N through two-flop synchronisers.
//
// Transaction (48 SCLK cycles, MSB first):
//   bit 47      1 = write, 0 = read
//   bits 46:40  ignored
//   bits 39:32  address
//   bits 31:0   write data on MOSI, or read data on MISO
// Address map: 0x00-0x3F channel configuration (ch_cfg_t), 0x40-0x7F dark
// counter of channel addr-0x40 (read; a write clears it), 0x80 global
// configuration (glb_cfg_t), 0x81 test pulse configuration (tp_cfg_t),
// 0x82 status (read only). A write takes effect at the 48th rising SCLK.
// Reset: every channel enabled, validation in VAL_SYNC_WINDOW with an 8
// cycle window, transmitter on one SDR link.
// A 10 MHz SPI interface that writes and reads channel configuration and
// controls calibration and test modes follows the document; the framing,
// address map and reset values are this design's own.
module spi_config
  import tofpet_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          sclk,
  input  logic          cs_n,
  input  logic          mosi,
  output logic          miso,
  output ch_cfg_t       ch_cfg [N_CH],
  output glb_cfg_t      glb_cfg,
  output tp_cfg_t       tp_cfg,
  input  logic [31:0]   status,
  output logic [CH_W-1:0] dark_rd_ch,
  input  logic [15:0]   dark_rd_data,
  output logic          dark_clr,
  output logic [CH_W-1:0] dark_clr_ch
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam ch_cfg_t  CH_RST  = '{ch_enable: 1'b1, val_mode: VAL_SYNC_WINDOW, default: '0};
  localparam glb_cfg_t GLB_RST = '{val_win: 8'd8, tx_enable: 1'b1, default: '0};

  logic [2:0]  sclk_s;
  logic [1:0]  cs_s, mosi_s;
  logic [5:0]  bitcnt;
  logic [47:0] sh_in;
  logic [31:0] sh_out;
  logic [31:0] rd_word;
  logic [7:0]  addr;

  always_ff @(posedge clk) begin
    sclk_s <= {sclk_s[1:0], sclk};
    cs_s   <= {cs_s[0], cs_n};
    mosi_s <= {mosi_s[0], mosi};
  end

  wire sck_rise = sclk_s[1] & ~sclk_s[2];
  wire sck_fall = ~sclk_s[1] & sclk_s[2];
  wire active   = ~cs_s[1];
  wire [47:0] nxt_in = {sh_in[46:0], mosi_s[1]};

  assign addr       = nxt_in[7:0];
  assign dark_rd_ch = addr[CH_W-1:0];

  always_comb begin
    if (addr < A_DARK)         rd_word = ch_cfg[addr[CH_W-1:0]];
    else if (addr < A_GLOBAL)  rd_word = {16'h0, dark_rd_data};
    else if (addr == A_GLOBAL) rd_word = glb_cfg;
    else if (addr == A_TP)     rd_word = tp_cfg;
    else if (addr == A_STATUS) rd_word = status;
    else                       rd_word = '0;
  end

  always_ff @(posedge clk) begin
    dark_clr <= 1'b0;
    if (rst) begin
      bitcnt  <= '0;
      sh_in   <= '0;
      sh_out  <= '0;
      miso    <= 1'b0;
      glb_cfg <= GLB_RST;
      tp_cfg  <= '0;
      dark_clr_ch <= '0;
      for (int i = 0; i < N_CH; i++) ch_cfg[i] <= CH_RST;
    end else if (!active) begin
      bitcnt <= '0;
      miso   <= 1'b0;
    end else begin
      if (sck_rise) begin
        sh_in  <= nxt_in;
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == 6'd15) sh_out <= rd_word;
        if (bitcnt == 6'd47 && nxt_in[47]) begin
          if (nxt_in[39:32] < A_DARK)
            ch_cfg[nxt_in[32 +: CH_W]] <= ch_cfg_t'(nxt_in[31:0]);
          else if (nxt_in[39:32] < A_GLOBAL) begin
            dark_clr    <= 1'b1;
            dark_clr_ch <= nxt_in[32 +: CH_W];
          end
          else if (nxt_in[39:32] == A_GLOBAL) glb_cfg <= glb_cfg_t'(nxt_in[31:0]);
          else if (nxt_in[39:32] == A_TP)     tp_cfg  <= tp_cfg_t'(nxt_in[31:0]);
        end
      end
      if (sck_fall && bitcnt >= 6'd16) begin
        miso   <= sh_out[31];
        sh_out <= {sh_out[30:0], 1'b0};
      end
    end
  end
endmodule
