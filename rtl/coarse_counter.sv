// coarse_counter: global coarse time base of the chip.
//
// A CW-bit binary counter runs on the system clock (160 MHz in the chip) and
// is distributed to every channel gray-encoded, so that a channel sampling it
// asynchronously to its update sees at most one bit change. One full turn of
// the counter (2^CW cycles, 1024 at the default) is one frame: the frame
// counter increments when the coarse counter wraps, its least significant bit
// is sent to the channels as the frame parity, and frame_start pulses for the
// cycle in which the coarse count is zero.
//
// Timing: all outputs are registered. coarse_gray and coarse_bin show the
// same count; frame_start is high while coarse_bin == 0.
// The gray code and the 10-bit width follow the document; the frame counter,
// its width and the frame = one counter turn are this design's choice.
module coarse_counter #(
  parameter int unsigned CW = 10,
  parameter int unsigned FW = 20
) (
  input  logic          clk,
  input  logic          rst,          // synchronous, active high
  output logic [CW-1:0] coarse_bin,
  output logic [CW-1:0] coarse_gray,
  output logic [FW-1:0] frame_num,
  output logic          frame_lsb,
  output logic          frame_start
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CW-1:0] nxt;
  assign nxt = coarse_bin + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      coarse_bin  <= '0;
      coarse_gray <= '0;
      frame_num   <= '0;
      frame_start <= 1'b1;
    end else begin
      coarse_bin  <= nxt;
      coarse_gray <= nxt ^ (nxt >> 1);
      frame_start <= (nxt == '0);
      if (nxt == '0) frame_num <= frame_num + 1'b1;
    end
  end

  assign frame_lsb = frame_num[0];
endmodule
