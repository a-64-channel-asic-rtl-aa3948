// tb_dark_counters: random dark pulses on all channels are counted per
// channel against a reference model; a clear zeroes one counter; counters
// saturate (checked with an 4-bit instance).
module tb_dark_counters;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;
  logic [63:0] dc = '0;
  logic clr = 0;
  logic [5:0] clr_ch = 0, rd_ch = 0;
  logic [15:0] rd;
  logic [3:0] rd4;
  int ref_cnt [64];

  dark_counters dut (.clk, .rst, .darkcount(dc), .clear_en(clr), .clear_ch(clr_ch),
                     .rd_ch, .rd_data(rd));
  dark_counters #(.N(4), .W(4)) dut4 (.clk, .rst, .darkcount({3'b0, dc[0]}), .clear_en(1'b0),
                     .clear_ch(2'd0), .rd_ch(2'd0), .rd_data(rd4));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (3) @(posedge clk); @(negedge clk); rst = 0;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      dc = {$urandom, $urandom};
      for (int i = 0; i < 64; i++) if (dc[i]) ref_cnt[i]++;
    end
    @(negedge clk); dc = '0;
    for (int i = 0; i < 64; i++) begin
      rd_ch = 6'(i); #0.1;
      check(rd == 16'(ref_cnt[i]), $sformatf("channel %0d count", i));
    end
    check(rd4 == 4'hF, "saturates at all ones");
    @(negedge clk); clr = 1; clr_ch = 6'd5; @(negedge clk); clr = 0;
    rd_ch = 5; #0.1 check(rd == 0, "cleared counter");
    rd_ch = 6; #0.1 check(rd == 16'(ref_cnt[6]), "neighbour untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
