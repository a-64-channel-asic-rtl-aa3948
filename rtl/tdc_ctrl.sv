// tdc_ctrl: on-channel control of the two mixed-mode TDCs of one channel.
//
// The channel has a timing branch (trigger DOT, low threshold, rising edge)
// and an energy branch (trigger DOE, higher threshold, falling edge), each
// with four TACs and one ADC (see tac_adc_model). This block
//   - arms TAC pair wr_ptr and, when DOT rises, latches the gray coarse time
//     t_coarse, the frame parity and the TAC id;
//   - validates the trigger with DOE by one of three mechanisms (val_mode):
//       VAL_SYNC_WINDOW  DOE seen high within val_win cycles of DOT,
//       VAL_ASYNC        the DOE rising edge itself samples DOT high (an
//                        asynchronous flop clocked by DOE),
//       VAL_SYNC_SAMPLE  DOE level sampled exactly val_win cycles after DOT;
//     a trigger that fails is a dark count: darkcount pulses, the TAC pair
//     is discharged and re-armed;
//   - latches e_coarse when DOE falls and queues the TAC pair for
//     conversion, then moves to the next TAC (the quad-buffer derandomiser);
//   - converts queued pairs in order: pulses conv_start, latches soc and, as
//     each ADC comparator returns, t_eoc and e_eoc; the fine times are
//     t_eoc - soc and e_eoc - soc in coarse counts (50 ps bins);
//   - holds the result in the channel data register (ev_valid, ev) until
//     the global controller pulses ev_ack, then discharges the TAC pair.
// After reset the controller discharges the four TAC pairs one per cycle
// and arms the first one only then, so no TAC keeps a charge from power-up.
// trig_err flags an event during whose validation a second DOT edge came,
// so that the latched time may belong to a dark pulse.
//
// Timing: DOT, DOE and the two eoc inputs are asynchronous. The DOT rising
// and DOE falling edges each flip a toggle flop (so a pulse shorter than a
// clock period is still seen) and the toggles and levels pass through
// two-flop synchronisers; a coarse value is the counter value loaded at the
// clock edge at which the TAC stopped (tac_adc_model stops at the second
// edge after the trigger), so the trigger happened fine x 50 ps before that
// edge, up to a constant conversion offset.
// The quad buffer, the dual threshold, the three validation mechanisms,
// the five latched coarse fields, TAC id, frame id, darkcount and trig_err
// follow the document; the exact validation rules, the state machines and
// the ev_valid/ev_ack handshake are this design's own.
module tdc_ctrl
  import tofpet_pkg::*;
#(
  parameter int unsigned NT = N_TAC
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  val_mode_e         val_mode,
  input  logic [7:0]        val_win,
  input  logic [CW-1:0]     coarse_gray,
  input  logic              frame_lsb,
  // discriminator outputs, asynchronous
  input  logic              dot,
  input  logic              doe,
  // analog TDC branches
  output logic              arm,
  output logic [TAC_W-1:0]  wr_sel,
  output logic              conv_start,
  output logic [TAC_W-1:0]  conv_sel,
  output logic              clr,
  output logic [TAC_W-1:0]  clr_sel,
  input  logic              t_eoc_in,
  input  logic              e_eoc_in,
  // channel data register
  output logic              ev_valid,
  output ch_event_t         ev,
  input  logic              ev_ack,
  output logic              darkcount
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_FREE, S_WRITE, S_PEND} slot_e;
  typedef enum logic [1:0] {W_IDLE, W_VALIDATE, W_EFALL} wstate_e;
  typedef enum logic [1:0] {C_IDLE, C_SOC, C_WAIT, C_OUT} cstate_e;

  // ---------------- synchronisers ----------------
  logic [2:0] dot_s, doe_s;
  logic [1:0] teoc_s, eeoc_s, ahit_s;
  logic       async_hit, aclr;

  // Edge toggles: a DOT pulse shorter than a clock period still starts the
  // TAC, so its edge must not be lost between two clock samples.
  logic dot_tog, doe_tog, doe_lvl_s;
  always_ff @(posedge dot or posedge rst) begin
    if (rst) dot_tog <= 1'b0;
    else     dot_tog <= ~dot_tog;
  end
  always_ff @(negedge doe or posedge rst) begin
    if (rst) doe_tog <= 1'b0;
    else     doe_tog <= ~doe_tog;
  end

  always_ff @(posedge clk) begin
    dot_s  <= {dot_s[1:0], dot_tog};
    doe_s  <= {doe_s[1:0], doe_tog};
    doe_lvl_s <= doe;
    teoc_s <= {teoc_s[0], t_eoc_in};
    eeoc_s <= {eeoc_s[0], e_eoc_in};
    ahit_s <= {ahit_s[0], async_hit};
  end

  // asynchronous validation: DOE's rising edge samples DOT
  always_ff @(posedge doe or posedge aclr) begin
    if (aclr) async_hit <= 1'b0;
    else      async_hit <= dot;
  end

  logic doe_lvl_q;
  always_ff @(posedge clk) doe_lvl_q <= doe_lvl_s;

  wire dot_rise = dot_s[1] ^ dot_s[2];
  wire doe_fall = doe_s[1] ^ doe_s[2];
  wire doe_lvl  = doe_lvl_q;

  // ---------------- slot bookkeeping ----------------
  slot_e             slot_st  [NT];
  logic [CW-1:0]     sl_tc    [NT];
  logic [CW-1:0]     sl_ec    [NT];
  logic              sl_fid   [NT];
  logic              sl_terr  [NT];
  logic [TAC_W-1:0]  wr_ptr, rd_ptr;

  wstate_e           wst;
  cstate_e           cst;
  logic [7:0]        win_cnt;
  logic              e_done, terr;
  logic [CW-1:0]     e_lat;

  logic [CW-1:0]     soc_q, teoc_q, eeoc_q;
  logic              t_done, e_done_c, t_low, e_low;

  assign wr_sel   = wr_ptr;
  assign conv_sel = rd_ptr;
  // after reset all TACs are discharged once, one per cycle
  logic              init;
  logic [TAC_W-1:0]  init_cnt;

  assign arm      = enable && !clr && !init &&
                    ((wst != W_IDLE) || (slot_st[wr_ptr] == S_FREE));

  // validation decision for the current cycle
  logic valid_now, fail_now;
  always_comb begin
    valid_now = 1'b0;
    fail_now  = 1'b0;
    unique case (val_mode)
      VAL_ASYNC: begin
        valid_now = ahit_s[1];
        fail_now  = !ahit_s[1] && (win_cnt >= val_win);
      end
      VAL_SYNC_SAMPLE: begin
        valid_now = (win_cnt >= val_win) && doe_lvl;
        fail_now  = (win_cnt >= val_win) && !doe_lvl;
      end
      default: begin  // VAL_SYNC_WINDOW
        valid_now = doe_lvl || e_done;
        fail_now  = !(doe_lvl || e_done) && (win_cnt >= val_win);
      end
    endcase
  end

  // ---------------- slot events ----------------
  wire w_claim  = (wst == W_IDLE) && enable && dot_rise &&
                  slot_st[wr_ptr] == S_FREE && !clr && !init;
  wire w_fail   = (wst == W_VALIDATE) && !valid_now && fail_now;
  wire w_commit = (wst == W_EFALL) && (e_done || doe_fall);
  wire c_free   = (cst == C_OUT) && !ev_valid && !w_fail;

  // ---------------- write side ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      wst       <= W_IDLE;
      wr_ptr    <= '0;
      win_cnt   <= '0;
      e_done    <= 1'b0;
      terr      <= 1'b0;
      e_lat     <= '0;
      darkcount <= 1'b0;
      aclr      <= 1'b1;
      for (int i = 0; i < NT; i++) begin
        sl_tc[i] <= '0; sl_ec[i] <= '0; sl_fid[i] <= 1'b0; sl_terr[i] <= 1'b0;
      end
    end else begin
      darkcount   <= 1'b0;
      aclr        <= 1'b0;
      unique case (wst)
        W_IDLE: begin
          if (w_claim) begin
            sl_tc[wr_ptr]  <= coarse_gray;
            sl_fid[wr_ptr] <= frame_lsb;
            win_cnt <= '0;
            e_done  <= 1'b0;
            terr    <= 1'b0;
            wst     <= W_VALIDATE;
          end
        end
        W_VALIDATE: begin
          if (win_cnt != 8'hFF) win_cnt <= win_cnt + 1'b1;
          if (dot_rise) terr <= 1'b1;
          if (doe_fall) begin e_done <= 1'b1; e_lat <= coarse_gray; end
          if (valid_now) begin
            wst <= W_EFALL;
          end else if (fail_now) begin
            darkcount   <= 1'b1;
            aclr        <= 1'b1;
            wst         <= W_IDLE;
          end
        end
        W_EFALL: begin
          if (dot_rise) terr <= 1'b1;
          if (e_done || doe_fall) begin
            sl_ec[wr_ptr]   <= e_done ? e_lat : coarse_gray;
            sl_terr[wr_ptr] <= terr || dot_rise;
            wr_ptr <= wr_ptr + 1'b1;
            aclr   <= 1'b1;
            wst    <= W_IDLE;
          end
        end
        default: wst <= W_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NT; i++) slot_st[i] <= S_FREE;
    end else begin
      if (w_claim)  slot_st[wr_ptr] <= S_WRITE;
      if (w_fail)   slot_st[wr_ptr] <= S_FREE;
      if (w_commit) slot_st[wr_ptr] <= S_PEND;
      if (c_free)   slot_st[rd_ptr] <= S_FREE;
    end
  end

  // ---------------- conversion side ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      cst        <= C_IDLE;
      rd_ptr     <= '0;
      conv_start <= 1'b0;
      clr        <= 1'b0;
      clr_sel    <= '0;
      soc_q      <= '0;
      teoc_q     <= '0;
      eeoc_q     <= '0;
      t_done     <= 1'b0;
      e_done_c   <= 1'b0;
      t_low      <= 1'b0;
      e_low      <= 1'b0;
      ev_valid   <= 1'b0;
      ev         <= '0;
      init       <= 1'b1;
      init_cnt   <= '0;
    end else begin
      conv_start <= 1'b0;
      clr        <= 1'b0;
      if (ev_ack) ev_valid <= 1'b0;
      if (w_fail) begin
        clr     <= 1'b1;
        clr_sel <= wr_ptr;
      end
      unique case (cst)
        C_IDLE: if (slot_st[rd_ptr] == S_PEND) begin
          conv_start <= 1'b1;
          t_done <= 1'b0; e_done_c <= 1'b0; t_low <= 1'b0; e_low <= 1'b0;
          cst <= C_SOC;
        end
        C_SOC: begin
          cst <= C_WAIT;  // the ADC started at this edge
        end
        C_WAIT: begin
          if (!teoc_s[1]) t_low <= 1'b1;
          if (!eeoc_s[1]) e_low <= 1'b1;
          if (t_low && teoc_s[1] && !t_done) begin t_done <= 1'b1; teoc_q <= coarse_gray; end
          if (e_low && eeoc_s[1] && !e_done_c) begin e_done_c <= 1'b1; eeoc_q <= coarse_gray; end
          if (t_done && e_done_c) cst <= C_OUT;
        end
        C_OUT: if (!ev_valid && !w_fail) begin
          ev_valid <= 1'b1;
          ev.tac_id   <= rd_ptr;
          ev.frame_id <= sl_fid[rd_ptr];
          ev.trig_err <= sl_terr[rd_ptr];
          ev.data     <= '{t_coarse: sl_tc[rd_ptr], e_coarse: sl_ec[rd_ptr],
                           soc: soc_q, t_eoc: teoc_q, e_eoc: eeoc_q};
          clr     <= 1'b1;
          clr_sel <= rd_ptr;
          rd_ptr  <= rd_ptr + 1'b1;
          cst     <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
      if (cst == C_SOC) soc_q <= coarse_gray;
      if (init) begin
        clr      <= 1'b1;
        clr_sel  <= init_cnt;
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == TAC_W'(NT - 1)) init <= 1'b0;
      end
    end
  end

endmodule
