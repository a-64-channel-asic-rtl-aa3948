// tofpet_pkg: constants and types shared by the TOFPET readout logic.
//
// The chip time-stamps SiPM pulses with a dual-threshold scheme: a low
// threshold (DOT) triggers a timing TAC on the rising edge, a higher
// threshold (DOE) validates the event and triggers an energy TAC on the
// falling edge. Every time stamp is a 10-bit gray coarse count of the
// 160 MHz clock plus a fine value obtained by time multiplication: the TAC
// charge is discharged about 125 times more slowly and the duration of that
// conversion is itself counted on the coarse clock (start-of-conversion
// "soc" and end-of-conversion "t_eoc"/"e_eoc"). A channel therefore holds
// five 10-bit coarse values, the 50-bit event word.
//
// The 10-bit coarse width, the 50-bit word and its five fields, the four
// TACs per branch, 64 channels, 96 events per frame and the SDR/DDR one- or
// two-link output follow the document. The 40-bit slot, the header layout,
// the configuration register map and the SPI framing are this design's own.
package tofpet_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N_CH     = 64;   // channels per chip
  localparam int unsigned CH_W     = 6;    // channel index width
  localparam int unsigned CW       = 10;   // coarse counter width
  localparam int unsigned FW       = 20;   // frame number width (own choice)
  localparam int unsigned N_TAC    = 4;    // TACs per branch (quad buffer)
  localparam int unsigned TAC_W    = 2;    // TAC id width
  localparam int unsigned EV_W     = 5 * CW; // 50-bit channel event word
  localparam int unsigned SLOT_W   = 40;   // one output slot (own choice)
  localparam int unsigned MAX_EV   = 96;   // events (slots) per frame
  localparam int unsigned DAC_W    = 6;    // front-end DAC code width

  // Raw channel word, fields in the order of the channel data register.
  typedef struct packed {
    logic [CW-1:0] t_coarse;  // gray coarse time of the timing trigger
    logic [CW-1:0] e_coarse;  // gray coarse time of the energy trigger falling edge
    logic [CW-1:0] soc;       // gray coarse time at start of conversion
    logic [CW-1:0] t_eoc;     // gray coarse time at end of timing conversion
    logic [CW-1:0] e_eoc;     // gray coarse time at end of energy conversion
  } ev_data_t;

  // Everything a channel hands to the global controller for one event.
  typedef struct packed {
    logic [TAC_W-1:0] tac_id;    // which of the four TAC pairs was written
    logic             frame_id;  // frame parity when t_coarse was latched
    logic             trig_err;  // a second timing trigger hit the validation window
    ev_data_t         data;
  } ch_event_t;

  // Dark pulse rejection: three validation mechanisms.
  typedef enum logic [1:0] {
    VAL_SYNC_WINDOW = 2'd0,  // DOE must rise within val_win clock cycles of DOT
    VAL_ASYNC       = 2'd1,  // DOE rising edge must find DOT still high
    VAL_SYNC_SAMPLE = 2'd2   // DOE level sampled val_win cycles after DOT
  } val_mode_e;

  // Per-channel configuration register (SPI addresses 0x00-0x3F).
  typedef struct packed {
    logic             ch_enable;   // [31]
    logic             reserved;    // [30]
    logic             sh_enable;   // [29] RC shaper on the energy branch
    logic             n_input;     // [28] 1: n-type input, 0: p-type input
    logic             cal_enable;  // [27] charge injection from the calibration circuit
    logic             tp_enable;   // [26] test pulse replaces DOT/DOE at the TDC
    logic [DAC_W-1:0] tac_dac;     // [25:20] TAC charge/discharge matching DAC
    logic [DAC_W-1:0] bias_dac;    // [19:14] input stage baseline/impedance DAC
    logic [DAC_W-1:0] vth_e;       // [13:8] energy threshold DAC
    logic [DAC_W-1:0] vth_t;       // [7:2] timing threshold DAC
    val_mode_e        val_mode;    // [1:0]
  } ch_cfg_t;

  // Global configuration register (SPI address 0x80).
  typedef struct packed {
    logic [7:0]  reserved;   // [31:24]
    logic [7:0]  val_win;    // [23:16] validation window, clock cycles
    logic [7:0]  reserved2;  // [15:8]
    logic        rsv;        // [7]
    logic        tp_ext;     // [6] test pulse from the external LVDS input
    logic        tx_clk_en;  // [5] forward an output clock
    logic        raw_mode;   // [4] safe mode: unprocessed events, two slots each
    logic        tx_train;   // [3] send the training pattern
    logic        tx_ddr;     // [2] DDR instead of SDR
    logic        tx_2links;  // [1] use both links
    logic        tx_enable;  // [0]
  } glb_cfg_t;

  // Test pulse configuration register (SPI address 0x81).
  typedef struct packed {
    logic [DAC_W-1:0] cal_amp;  // [31:26] calibration injection amplitude
    logic [1:0]       rsv;      // [25:24]
    logic [7:0]       width;    // [23:16] pulse length, clock cycles
    logic [15:0]      period;   // [15:0] pulse period, clock cycles (0 = off)
  } tp_cfg_t;

  localparam logic [7:0] A_DARK   = 8'h40;  // 0x40-0x7F dark counters
  localparam logic [7:0] A_GLOBAL = 8'h80;
  localparam logic [7:0] A_TP     = 8'h81;
  localparam logic [7:0] A_STATUS = 8'h82;

  // Processed event slot: 40 bits.
  typedef struct packed {
    logic [CH_W-1:0] channel;   // [39:34]
    logic            frame_id;  // [33]
    logic [CW-1:0]   t_coarse;  // [32:23] binary
    logic [7:0]      t_fine;    // [22:15] t_eoc - soc
    logic [6:0]      tot;       // [14:8]  e_coarse - t_coarse, saturated
    logic [7:0]      e_fine;    // [7:0]   e_eoc - soc
  } proc_slot_t;

  // Frame header slot: 40 bits.
  localparam logic [3:0] HDR_TAG = 4'hA;
  typedef struct packed {
    logic [3:0]    tag;       // HDR_TAG
    logic [FW-1:0] frame;     // frame number
    logic          raw;       // slots are raw halves
    logic [6:0]    n_slots;   // slots following the header
    logic [7:0]    lost;      // events dropped, saturated at 255
  } hdr_slot_t;

  localparam logic [SLOT_W-1:0] TRAIN_WORD = 40'h00000_FFFFF;
  localparam logic [SLOT_W-1:0] IDLE_WORD  = 40'h0;

  function automatic logic [CW-1:0] bin2gray(input logic [CW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [CW-1:0] gray2bin(input logic [CW-1:0] g);
    logic [CW-1:0] b;
    b[CW-1] = g[CW-1];
    for (int i = CW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
