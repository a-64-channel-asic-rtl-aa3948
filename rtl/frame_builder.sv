// frame_builder: packs processed events into frames of one coarse period.
//
// A frame is one turn of the coarse counter (FRAME_LEN cycles). Slots that
// arrive during a frame are written into one bank of a ping-pong buffer; at
// the frame boundary the banks swap and the closed frame is sent out as a
// header slot (hdr_slot_t: tag, frame number, raw flag, slot count, events
// lost) followed by its slots, while the next frame fills the other bank.
// A frame holds at most `cap` slots, where cap is what the link can send in
// one frame period beside the header, limited to MAX_EV:
//   cap = min(MAX_EV, FRAME_LEN * bits_per_cycle / SLOT_W - 1)
// which is 24, 50 and 96 slots for 1, 2 and 4 bits per cycle at the
// defaults. A raw event needs two slots and is kept only if both fit.
// Events that do not fit are counted in the header's `lost` field
// (saturating at 255). If a frame closes before the previous one has been
// sent (only possible when the link mode changes mid-frame) it is dropped
// and frames_dropped counts it.
//
// Interface: slot input with valid/ready (in_two: two-slot raw event), slot
// output with valid/ready. The input is stalled in the frame_start cycle
// and for the second half of a raw event. Output starts the cycle after
// the swap.
// Frames with up to 96 events and raw events taking two slots follow the
// document; everything else here is this design's own.
module frame_builder
  import tofpet_pkg::*;
#(
  parameter int unsigned MAXS      = MAX_EV,
  parameter int unsigned FRAME_LEN = 1 << CW
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              frame_start,
  input  logic [FW-1:0]     frame_num,
  input  logic              raw_mode,
  input  logic [2:0]        bits_per_cycle,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_two,
  input  logic [SLOT_W-1:0] in_s0,
  input  logic [SLOT_W-1:0] in_s1,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [SLOT_W-1:0] out_slot,
  output logic [7:0]        frames_dropped
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = $clog2(MAXS + 1);

  logic [SLOT_W-1:0] mem [2][MAXS];
  logic              wb;          // bank being written
  logic [AW-1:0]     wcount;
  logic [7:0]        lost;
  logic              second;      // second half of a raw event pending
  logic [SLOT_W-1:0] s1_q;
  logic [AW-1:0]     cap;

  // read side
  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DATA} rstate_e;
  rstate_e           rst_q;
  logic              rb;
  logic [AW-1:0]     rcount, ridx;
  hdr_slot_t         hdr;
  logic              rd_last, rd_free;

  assign rd_last = (rst_q == R_DATA && 32'(ridx) + 1 >= 32'(rcount)) ||
                   (rst_q == R_HDR && rcount == '0);
  assign rd_free = (rst_q == R_IDLE) || (rd_last && out_ready);

  always_comb begin
    int unsigned c;
    c   = (FRAME_LEN * int'(bits_per_cycle)) / SLOT_W;
    c   = (c > 0) ? c - 1 : 0;
    cap = AW'((c > MAXS) ? MAXS : c);
  end

  assign in_ready = !frame_start && !second;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb       <= 1'b0;
      wcount   <= '0;
      lost     <= '0;
      second   <= 1'b0;
      s1_q     <= '0;
      rst_q    <= R_IDLE;
      rb       <= 1'b0;
      rcount   <= '0;
      ridx     <= '0;
      hdr      <= '0;
      frames_dropped <= '0;
    end else begin
      // ---- write side ----
      if (frame_start) begin
        if (!rd_free && frames_dropped != 8'hFF) frames_dropped <= frames_dropped + 1'b1;
        if (rd_free) wb <= ~wb;
        if (second) begin  // finish a raw event cut by the boundary
          mem[wb][wcount] <= s1_q;
          second <= 1'b0;
        end
        wcount <= '0;
        lost   <= '0;
      end else if (second) begin
        mem[wb][wcount] <= s1_q;
        wcount <= wcount + 1'b1;
        second <= 1'b0;
      end else if (in_valid) begin
        if (32'(wcount) + (in_two ? 32'd2 : 32'd1) <= 32'(cap)) begin
          mem[wb][wcount] <= in_s0;
          wcount <= wcount + 1'b1;
          if (in_two) begin
            second <= 1'b1;
            s1_q   <= in_s1;
          end
        end else if (lost != 8'hFF) begin
          lost <= lost + 1'b1;
        end
      end

      // ---- read side ----
      if (frame_start && rd_free) begin
        rb     <= wb;
        rcount <= wcount + AW'(second);
        hdr    <= '{tag: HDR_TAG, frame: frame_num - 1'b1, raw: raw_mode,
                    n_slots: 7'(wcount + AW'(second)), lost: lost};
        ridx   <= '0;
        rst_q  <= R_HDR;
      end else if (out_valid && out_ready) begin
        unique case (rst_q)
          R_HDR:   rst_q <= (rcount == '0) ? R_IDLE : R_DATA;
          R_DATA: begin
            ridx <= ridx + 1'b1;
            if (rd_last) rst_q <= R_IDLE;
          end
          default: ;
        endcase
      end
    end
  end

  assign out_valid = (rst_q != R_IDLE);
  assign out_slot  = (rst_q == R_HDR) ? SLOT_W'(hdr) : mem[rb][ridx];
endmodule
