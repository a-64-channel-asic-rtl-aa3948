// tx_receiver: testbench model of the board-side receiver of the data links.
//
// It rebuilds the bit stream from txd in the serializer's order (k-th bit
// of a cycle on link k mod links, half k div links). While `align` is high
// it searches the stream for the training word and locks the slot boundary
// to it; afterwards every 40 bits form a word, reported with word_valid.
// Link settings must only change while aligning.
module tx_receiver
  import tofpet_pkg::*;
(
  input  logic             clk,
  input  logic [1:0][1:0]  txd,
  input  logic             two,
  input  logic             ddr,
  input  logic             align,
  output logic             locked,
  output logic             word_valid,
  output logic [SLOT_W-1:0] word
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [SLOT_W-1:0] sh = '0;
  int nbits = 0;

  initial begin locked = 0; word_valid = 0; word = '0; end

  always @(posedge clk) begin
    automatic int L = two ? 2 : 1;
    automatic int b = L * (ddr ? 2 : 1);
    word_valid <= 1'b0;
    for (int k = 0; k < b; k++) begin
      sh = {sh[SLOT_W-2:0], txd[k % L][k / L]};
      nbits++;
      if (align) begin
        if (sh == TRAIN_WORD) begin locked <= 1'b1; nbits = 0; end
      end else if (locked && nbits == SLOT_W) begin
        word_valid <= 1'b1;
        word <= sh;
        nbits = 0;
      end
    end
  end
endmodule
