// tb_readout_arbiter: 64 modelled channel registers hold random events
// until acknowledged; the sink applies random back-pressure. Every event
// must come out exactly once, with its channel number and contents, and
// with all channels requesting the grants must go round-robin.
module tb_readout_arbiter;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  logic [63:0] req = '0, ack;
  ch_event_t ev_in [64];
  logic out_valid, out_ready = 0;
  logic [5:0] out_ch;
  ch_event_t out_ev;

  readout_arbiter dut (.clk, .rst, .req, .ev_in, .ack, .out_valid, .out_ready, .out_ch, .out_ev);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sent = 0, got = 0, prev_ch = -1;
  bit rr_phase = 0;
  ch_event_t exp_ev [64][$];

  // channel model: new events appear randomly, held until ack
  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < 64; i++) begin
        if (ack[i]) begin
          check(req[i], "ack only to a requesting channel");
          req[i] <= 1'b0;
        end else if (!req[i] && (sent < 2000 || rr_phase) && ($urandom % (rr_phase ? 1 : 40)) == 0) begin
          automatic ch_event_t e = {$urandom, $urandom};
          req[i] <= 1'b1; ev_in[i] <= e; exp_ev[i].push_back(e); sent++;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      got++;
      check(exp_ev[out_ch].size() > 0 && out_ev == exp_ev[out_ch].pop_front(), "event contents");
      if (rr_phase && prev_ch >= 0)
        check(out_ch == 6'(prev_ch + 1), "round-robin order when all request");
      prev_ch = out_ch;
    end
    out_ready <= rr_phase ? 1'b1 : ($urandom % 3 != 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    wait (sent >= 1500);
    wait (got == sent && req == '0);
    // all channels requesting all the time
    @(negedge clk); rr_phase = 1; prev_ch = -1;
    repeat (300) @(posedge clk);
    rr_phase = 0;
    @(negedge clk); sent = 100000;  // no new events from here on
    repeat (100) @(posedge clk);
    check(got > 1500 + 250, "events delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
