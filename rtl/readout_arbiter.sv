// readout_arbiter: collects events from the channel data registers.
//
// Every channel presents ev_valid and its event until acknowledged. The
// arbiter grants one requesting channel per cycle in round-robin order,
// starting after the channel granted last, so no channel can starve. The
// grant pulses that channel's ack (combinationally, in the cycle the event
// is taken) and the event moves into an output register with the channel
// number attached. The output follows a valid/ready handshake: a new event
// is taken only when the register is empty or being emptied.
//
// Timing: one event per clock at most; output one cycle after grant.
// That the global controller collects every channel's valid events follows
// the document; round-robin order and the handshake are this design's own.
module readout_arbiter
  import tofpet_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  input  ch_event_t            ev_in [N],
  output logic [N-1:0]         ack,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [$clog2(N)-1:0] out_ch,
  output ch_event_t            out_ev
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last, pick;
  logic          found, take;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N; k++) begin
      automatic logic [IW-1:0] idx = IW'((int'(last) + k) % N);
      if (!found && req[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
  end

  assign take = found && (!out_valid || out_ready);

  always_comb begin
    ack = '0;
    if (take) ack[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last      <= IW'(N - 1);
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_ev    <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_ch    <= pick;
        out_ev    <= ev_in[pick];
        last      <= pick;
      end
    end
  end
endmodule
