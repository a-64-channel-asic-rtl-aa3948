// tb_tofpet_channel: one channel cell, TDC controller with the analog branch
// models, driven by discriminator-like pulses at chosen phases.
//
// For a trigger phi ns after clock edge n the expected coarse stamp is
// gray(n + 2) and the expected fine value is 2 + ceil(125 x q / T) with
// q = 2T - phi, i.e. 2 + ceil(250 - 20 phi) at T = 6.25 ns: 125 bins of
// 50 ps per clock period plus the fixed two-cycle synchroniser offset. The
// same holds for the energy branch on DOE's falling edge. Several phases
// are swept, then the test pulse replaces the discriminators.
module tb_tofpet_channel;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T = 6.25;
  logic clk = 0, rst = 1;
  always #(T/2) clk = ~clk;

  int unsigned cnt = 0;
  always @(posedge clk) cnt <= cnt + 1;

  ch_cfg_t cfg;
  logic dot = 0, doe = 0, tp = 0, ev_valid, ev_ack = 0, darkcount;
  ch_event_t ev;

  tofpet_channel dut (.clk, .rst, .cfg, .val_win(8'd8), .coarse_gray(bin2gray(CW'(cnt))),
    .frame_lsb(1'b1), .dot, .doe, .test_pulse(tp), .ev_valid, .ev, .ev_ack, .darkcount);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int fine_of(input realtime phi);
    real x = 250.0 - 20.0 * phi;
    int  c = int'($floor(x));
    if (real'(c) < x) c++;
    return c + 2;
  endfunction

  task automatic event_at(input realtime phi_t, input realtime phi_e, input int len,
                          input bit use_tp, input string tag);
    int n_t, n_e, w;
    int dt, de;
    @(posedge clk); #(phi_t);
    n_t = cnt;
    if (use_tp) tp = 1; else begin dot = 1; #0.4 doe = 1; end
    repeat (len) @(posedge clk);
    #(phi_e);
    n_e = cnt;
    if (use_tp) tp = 0; else begin doe = 0; #0.3 dot = 0; end
    w = 0;
    while (!ev_valid && w < 1000) begin @(posedge clk); w++; end
    check(ev_valid, {tag, ": event"});
    dt = int'(CW'(gray2bin(ev.data.t_eoc) - gray2bin(ev.data.soc)));
    de = int'(CW'(gray2bin(ev.data.e_eoc) - gray2bin(ev.data.soc)));
    check(ev.data.t_coarse == bin2gray(CW'(n_t + 2)), {tag, ": t_coarse"});
    check(ev.data.e_coarse == bin2gray(CW'(n_e + 2)), {tag, ": e_coarse"});
    check(dt == fine_of(phi_t), $sformatf("%s: t fine %0d expected %0d", tag, dt, fine_of(phi_t)));
    check(de == fine_of(phi_e), $sformatf("%s: e fine %0d expected %0d", tag, de, fine_of(phi_e)));
    check(ev.frame_id == 1'b1, {tag, ": frame id"});
    @(negedge clk); ev_ack = 1; @(negedge clk); ev_ack = 0;
    repeat (5) @(posedge clk);
  endtask

  realtime ph [6] = '{0.31, 1.13, 2.47, 3.59, 4.83, 6.01};

  initial begin
    cfg = '0;
    cfg.ch_enable = 1;
    cfg.val_mode  = VAL_SYNC_WINDOW;
    repeat (4) @(posedge clk); rst = 0; repeat (4) @(posedge clk);
    for (int i = 0; i < 6; i++)
      event_at(ph[i], ph[5 - i], 10 + i, 0, $sformatf("phase %0d", i));
    // test pulse path: discriminators ignored
    cfg.tp_enable = 1;
    fork begin #3 dot = 1; #20 dot = 0; end join_none
    event_at(2.21, 4.41, 6, 1, "test pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
