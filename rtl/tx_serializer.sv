// tx_serializer: sends 40-bit slots over one or two data links.
//
// Each slot is shifted out MSB first. Per clock cycle the serializer emits
// bits_per_cycle = links x (DDR ? 2 : 1) bits: 1, 2 or 4, that is 160 to
// 640 Mbit/s at a 160 MHz clock. Within a cycle the k-th bit sent goes to
// link (k mod links) in half-cycle (k div links): txd[link][0] is the bit
// for the first (rising-edge) half, txd[link][1] for the second half. In SDR
// both halves carry the same bit. A DDR output cell in the pad ring turns
// these into the line signal.
// When no frame slot is waiting an idle slot (all zeros) is sent; in
// training mode the training word 0x00000FFFFF is sent continuously so a
// receiver can find the slot boundary without the forwarded clock. txclk is
// the forwarded clock pattern (1 in the first half, 0 in the second) when
// clk_en is set. Link settings are taken at each slot boundary.
//
// Interface: slot input with valid/ready (ready pulses when a slot is
// loaded). A new slot is loaded every 40/bits_per_cycle cycles.
// Two links, SDR/DDR, 160-640 Mbit/s, output clock and training mode follow
// the document; the bit order, idle and training words are this design's.
module tx_serializer
  import tofpet_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic              two_links,
  input  logic              ddr,
  input  logic              train,
  input  logic              clk_en,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [SLOT_W-1:0] in_slot,
  output logic [1:0][1:0]   txd,     // [link][half]
  output logic [1:0]        txclk    // [half]
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [SLOT_W-1:0] sh;
  logic [5:0]        left;      // bits still to send of the current slot
  logic              l2, d2;    // link settings of the current slot
  logic [2:0]        bpc;

  assign bpc      = (l2 ? 3'd2 : 3'd1) << d2;
  wire   load     = enable && (left <= 6'(bpc));
  assign in_ready = load && !train;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh   <= '0;
      left <= '0;
      l2   <= 1'b0;
      d2   <= 1'b0;
    end else if (!enable) begin
      left <= '0;
    end else if (load) begin
      sh   <= train ? TRAIN_WORD : (in_valid ? in_slot : IDLE_WORD);
      left <= 6'(SLOT_W);
      l2   <= two_links;
      d2   <= ddr;
    end else begin
      sh   <= sh << bpc;
      left <= left - 6'(bpc);
    end
  end

  // bits of the current cycle: sh[39] first
  always_comb begin
    txd = '0;
    if (enable && left != '0) begin
      if (!l2 && !d2) begin
        txd[0] = {2{sh[39]}};
      end else if (!l2 && d2) begin
        txd[0] = {sh[38], sh[39]};
      end else if (l2 && !d2) begin
        txd[0] = {2{sh[39]}};
        txd[1] = {2{sh[38]}};
      end else begin
        txd[0] = {sh[37], sh[39]};
        txd[1] = {sh[36], sh[38]};
      end
    end
  end

  assign txclk = (enable && clk_en) ? 2'b01 : 2'b00;
endmodule
