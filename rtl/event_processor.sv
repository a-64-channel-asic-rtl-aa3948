// event_processor: turns a channel's raw event into output slots.
//
// Normal mode (on-chip processing): the five gray coarse values are turned
// into binary and combined into one 40-bit slot (proc_slot_t):
//   t_coarse  binary coarse time of the timing trigger
//   t_fine    t_eoc - soc, the timing conversion length in coarse counts
//   tot       e_coarse - t_coarse (time over threshold, coarse), saturated
//             at 127
//   e_fine    e_eoc - soc, the energy conversion length
// Fine values above 255 saturate at 255. The trigger occurred t_fine x 50 ps
// (less a fixed offset) before the clock edge that loaded t_coarse.
// Raw (safe) mode: no arithmetic; the event takes two slots,
//   {channel, tac_id, frame_id, trig_err, 20'b0, 50-bit data} (80 bits),
// first slot holding the upper 40 bits.
//
// Interface: valid/ready in (from the arbiter) and out; one output register
// stage; out_two marks a two-slot raw event. Latency one cycle.
// On-chip processing, the raw mode taking two slots and the 50-bit word
// follow the document; the slot layouts and saturation are this design's.
module event_processor
  import tofpet_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              raw_mode,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [CH_W-1:0]   in_ch,
  input  ch_event_t         in_ev,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_two,
  output logic [SLOT_W-1:0] out_s0,
  output logic [SLOT_W-1:0] out_s1
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CW-1:0] tc, ec, sc, tq, eq, dt, de, dtot;
  proc_slot_t    ps;
  logic [2*SLOT_W-1:0] raw;

  always_comb begin
    tc   = gray2bin(in_ev.data.t_coarse);
    ec   = gray2bin(in_ev.data.e_coarse);
    sc   = gray2bin(in_ev.data.soc);
    tq   = gray2bin(in_ev.data.t_eoc);
    eq   = gray2bin(in_ev.data.e_eoc);
    dt   = tq - sc;
    de   = eq - sc;
    dtot = ec - tc;
    ps.channel  = in_ch;
    ps.frame_id = in_ev.frame_id;
    ps.t_coarse = tc;
    ps.t_fine   = (dt > 10'd255) ? 8'hFF : dt[7:0];
    ps.e_fine   = (de > 10'd255) ? 8'hFF : de[7:0];
    ps.tot      = (dtot > 10'd127) ? 7'h7F : dtot[6:0];
    raw = {in_ch, in_ev.tac_id, in_ev.frame_id, in_ev.trig_err, 20'h0, in_ev.data};
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_two   <= 1'b0;
      out_s0    <= '0;
      out_s1    <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_two <= raw_mode;
        out_s0  <= raw_mode ? raw[2*SLOT_W-1:SLOT_W] : ps;
        out_s1  <= raw[SLOT_W-1:0];
      end
    end
  end
endmodule
