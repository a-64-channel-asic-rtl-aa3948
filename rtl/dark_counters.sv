// dark_counters: one counter of rejected triggers per channel.
//
// Every channel pulses darkcount for a trigger that its energy threshold did
// not validate; counted over a known time this measures the SiPM dark count
// rate. Counters saturate at all ones. clear_en/clear_ch zero one counter
// (a configuration write to its address); rd_ch selects the counter shown on
// rd_data, combinationally.
// Counting the dark pulses for a rate measurement follows the document; the
// 16-bit saturating counters and the clear-by-write are this design's choice.
module dark_counters #(
  parameter int unsigned N  = 64,
  parameter int unsigned W  = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         darkcount,
  input  logic                 clear_en,
  input  logic [$clog2(N)-1:0] clear_ch,
  input  logic [$clog2(N)-1:0] rd_ch,
  output logic [W-1:0]         rd_data
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [W-1:0] cnt [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clear_en && clear_ch == i[$clog2(N)-1:0]) cnt[i] <= '0;
        else if (darkcount[i] && cnt[i] != '1)        cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

  assign rd_data = cnt[rd_ch];
endmodule
