// tb_tofpet_top: end-to-end test of the 64-channel chip at its default size.
//
// Discriminator-like pulses are applied to the dot/doe inputs at chosen
// phases of the 160 MHz clock; the chip is configured over SPI and its
// serial output is decoded by a receiver model aligned on the training
// word. For a timing trigger phi ns after the clock edge at which the coarse
// counter reads n, the expected processed event carries t_coarse = n + 2,
// t_fine = 2 + ceil(250 - 20 phi) (50 ps bins, i.e. the trigger lies
// (t_fine - 2) x 50 ps before the edge that loaded t_coarse), ToT = the
// coarse distance to the DOE falling edge and e_fine likewise.
//
// Mechanisms made to happen and counted: validated events on every
// channel, dark pulses rejected (read back from the dark counters), the
// asynchronous and the sampling validation modes, the quad buffer filling
// up, trig_err in raw mode, frame overflow on a single SDR link, the test
// pulse path with a trimmed TAC calibration DAC on one channel, a phase
// sweep with the external test pulse, a frame filled to its 96 events, re-training of the receiver, 1 link
// SDR and 2 links DDR.
module tb_tofpet_top;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T = 6.25;
  logic clk = 0, rst = 1;
  always #(T/2) clk = ~clk;

  logic sclk = 0, cs_n = 1, mosi = 0, miso, ext_tp = 0;
  logic [N_CH-1:0] dot = '0, doe = '0;
  logic [1:0][1:0] txd;
  logic [1:0] txclk;
  ch_cfg_t fe_cfg [N_CH];
  logic cal_pulse;
  logic [5:0] cal_amp;

  tofpet_top dut (.clk, .rst, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .ext_test_pulse(ext_tp), .dot, .doe, .txd, .txclk, .fe_cfg, .cal_pulse, .cal_amp);

  logic two = 0, ddr = 0, align = 1, locked, wv;
  logic [39:0] word;
  tx_receiver rx (.clk, .txd, .two, .ddr, .align, .locked, .word_valid(wv), .word);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  typedef enum int {M_VALID, M_DARK, M_ASYNC, M_SAMPLE, M_BUFFULL, M_TRIGERR, M_RAW,
                    M_OVERFLOW, M_TESTPULSE, M_FULLFRAME, M_TACDAC, M_EXTSWEEP, M_TRAIN, M_SDR1, M_DDR2, M_NUM} mech_e;
  int mech [M_NUM];
  string mname [M_NUM] = '{"valid event", "dark pulse rejected", "async validation",
    "sampled validation", "quad buffer full", "trig_err", "raw mode", "frame overflow",
    "test pulse", "frame of 96 events", "TAC calibration DAC", "ext. pulse phase sweep", "training", "1 link SDR", "2 links DDR"};

  // ---------------- SPI ----------------
  task automatic xfer(input bit wr, input logic [7:0] addr, input logic [31:0] wdata,
                      output logic [31:0] rdata);
    logic [47:0] w = {wr, 7'h0, addr, wdata};
    cs_n = 0; #100;
    for (int i = 47; i >= 0; i--) begin
      mosi = w[i]; #50; sclk = 1;
      if (i < 32) rdata[i] = miso;
      #50 sclk = 0;
    end
    #100 cs_n = 1; #200;
  endtask
  logic [31:0] r;
  bit training = 0;
  int in_frame = 0, lost_total = 0, raw_frame = 0, slots_total = 0;

  task automatic set_link(input bit t2, input bit d2, input bit raw);
    logic [31:0] g = 32'h0008_0001 | (32'(t2) << 1) | (32'(d2) << 2) | (32'(raw) << 4);
    logic [31:0] rr;
    training = 1;                              // words are not slots now
    xfer(1, A_GLOBAL, g | 32'h8, rr);          // training on
    two = t2; ddr = d2; align = 1;
    repeat (300) @(posedge clk);
    check(locked, "receiver locked on training word");
    align = 0;
    xfer(1, A_GLOBAL, g, rr);
    in_frame = 0;
    training = 0;
    mech[M_TRAIN]++;
    if (!t2 && !d2) mech[M_SDR1]++;
    if (t2 && d2) mech[M_DDR2]++;
  endtask

  // ---------------- stimulus ----------------
  realtime tedge = 0;
  always @(posedge clk) tedge = $realtime;

  typedef struct { int tc; bit fid; int tf; int tot; int ef; } exp_t;
  exp_t expq [N_CH][$];

  // g: conversion gain relative to nominal, 1 + dac/256 for a trimmed TAC DAC
  function automatic int fine_of(input realtime phi, input real g = 1.0);
    real x = (250.0 - 20.0 * phi) * g;
    int  c = int'($floor(x));
    if (real'(c) < x) c++;
    return c + 2;
  endfunction

  // coarse value and frame parity of the edge two edges after "now"
  task automatic stamp(output int tc, output bit fid);
    int n = int'(dut.u_gc.coarse_bin);
    int f = int'(dut.u_gc.frame_num);
    tc  = (n + 2) % 1024;
    fid = 1'((n + 2 >= 1024) ? f + 1 : f);
  endtask

  // valid pulse: DOT at phi_t after an edge, DOE 0.5 ns later, DOE falls
  // len cycles later at phi_e after an edge, DOT 0.3 ns after that
  task automatic hit(input int ch, input realtime phi_t, input int len, input realtime phi_e,
                     input bit expect_it);
    exp_t e;
    int tce; bit fe;
    @(posedge clk); #(phi_t);
    stamp(e.tc, e.fid);
    dot[ch] = 1; #0.5 doe[ch] = 1;
    repeat (len) @(posedge clk);
    #(phi_e);
    stamp(tce, fe);
    doe[ch] = 0; #0.3 dot[ch] = 0;
    e.tf  = fine_of(phi_t);
    e.ef  = fine_of(phi_e);
    e.tot = (tce - e.tc + 1024) % 1024;
    if (e.tot > 127) e.tot = 127;
    if (expect_it) expq[ch].push_back(e);
  endtask

  task automatic dark(input int ch);
    @(posedge clk); #1.3 dot[ch] = 1;
    repeat (2) @(posedge clk); #0.7 dot[ch] = 0;
  endtask

  // ---------------- receiver side ----------------
  logic [39:0] raw_first;
  bit raw_half = 0;
  logic [79:0] raw_events [$];
  proc_slot_t  proc_got [N_CH][$];

  always @(posedge clk) if (wv && !training) begin
    if (in_frame == 0) begin
      if (word != IDLE_WORD) begin
        automatic hdr_slot_t h = hdr_slot_t'(word);
        check(h.tag == HDR_TAG, $sformatf("header tag %h at %0t", word, $time));
        in_frame = int'(h.n_slots);
        raw_frame = h.raw;
        raw_half = 0;
        lost_total += int'(h.lost);
        if (h.lost != 0) mech[M_OVERFLOW]++;
        if (h.n_slots == 7'd96 && h.lost == 0 && !h.raw) mech[M_FULLFRAME]++;
      end
    end else begin
      in_frame--;
      slots_total++;
      if (raw_frame) begin
        if (!raw_half) raw_first = word;
        else raw_events.push_back({raw_first, word});
        raw_half = !raw_half;
      end else begin
        automatic proc_slot_t p = proc_slot_t'(word);
        proc_got[p.channel].push_back(p);
      end
    end
  end

  task automatic compare_all(input string tag);
    for (int ch = 0; ch < N_CH; ch++) begin
      check(proc_got[ch].size() == expq[ch].size(),
            $sformatf("%s: channel %0d got %0d events, expected %0d", tag, ch,
                      proc_got[ch].size(), expq[ch].size()));
      while (proc_got[ch].size() > 0 && expq[ch].size() > 0) begin
        automatic proc_slot_t p = proc_got[ch].pop_front();
        automatic exp_t e = expq[ch].pop_front();
        check(int'(p.t_coarse) == e.tc && p.frame_id == e.fid,
              $sformatf("%s: ch %0d t_coarse %0d exp %0d", tag, ch, p.t_coarse, e.tc));
        check(int'(p.t_fine) == e.tf, $sformatf("%s: ch %0d t_fine %0d exp %0d", tag, ch, p.t_fine, e.tf));
        check(int'(p.tot) == e.tot, $sformatf("%s: ch %0d tot %0d exp %0d", tag, ch, p.tot, e.tot));
        check(int'(p.e_fine) == e.ef, $sformatf("%s: ch %0d e_fine %0d exp %0d", tag, ch, p.e_fine, e.ef));
        if (tag == "async") mech[M_ASYNC]++;
        else if (tag == "sample") mech[M_SAMPLE]++;
        else if (tag == "sweep") mech[M_EXTSWEEP]++;
        else mech[M_VALID]++;
      end
      proc_got[ch].delete();
      expq[ch].delete();
    end
  endtask

  task automatic settle();
    repeat (2 * 1024 + 600) @(posedge clk);
  endtask

  int n0, cnt4;
  initial begin
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    repeat (4) @(posedge clk); rst = 0;
    repeat (4) @(posedge clk);

    // ---- 1. every channel, two events each, 2 links DDR ----
    set_link(1, 1, 0);
    for (int k = 0; k < 2; k++) begin
      for (int ch = 0; ch < N_CH; ch++) begin
        automatic int c = ch;
        automatic realtime pt = 0.025 + 0.05 * real'($urandom % 120);
        automatic realtime pe = 0.025 + 0.05 * real'($urandom % 120);
        fork hit(c, pt, 6 + ($urandom % 20), pe, 1); join_none
        repeat (3) @(posedge clk);
      end
      repeat (1100) @(posedge clk);
    end
    settle();
    compare_all("all channels");

    // ---- 2. dark pulses on channel 3 ----
    for (int i = 0; i < 5; i++) begin dark(3); repeat (30) @(posedge clk); end
    settle();
    xfer(0, A_DARK + 8'd3, 0, r);
    check(r == 5, $sformatf("dark counter of channel 3 = %0d", r));
    mech[M_DARK] += int'(r);
    compare_all("dark");   // no events expected

    // ---- 3. validation modes ----
    xfer(1, 8'd10, 32'h8000_0001, r);   // channel 10: asynchronous
    xfer(1, 8'd11, 32'h8000_0002, r);   // channel 11: sampled after val_win
    hit(10, 1.125, 10, 2.225, 1);
    repeat (20) @(posedge clk); #1 dot[10] = 1; #4 dot[10] = 0; #20 doe[10] = 1; #10 doe[10] = 0; // DOE after DOT fell
    repeat (40) @(posedge clk);
    hit(11, 3.325, 20, 4.425, 1);
    repeat (20) @(posedge clk);
    hit(11, 2.025, 3, 1.025, 0);             // DOE too short for the sample point
    settle();
    compare_all("async");
    xfer(0, A_DARK + 8'd10, 0, r); check(r == 1, $sformatf("async mode rejected late DOE (%0d)", r));
    xfer(0, A_DARK + 8'd11, 0, r); check(r == 1, "sample mode rejected short DOE");
    // (the ASYNC/SAMPLE counters are filled per mode below)
    hit(10, 0.925, 8, 1.925, 1); settle(); compare_all("async");
    hit(11, 0.925, 16, 1.925, 1); settle(); compare_all("sample");
    xfer(1, 8'd10, 32'h8000_0000, r);   // back to the default window mode
    xfer(1, 8'd11, 32'h8000_0000, r);

    // ---- 4. quad buffer: six triggers in quick succession on channel 20 ----
    for (int i = 0; i < 6; i++) begin
      hit(20, 1.025 + i * 0.5, 3, 2.025, i < 4);
      repeat (4) @(posedge clk);
    end
    settle();
    cnt4 = expq[20].size();
    compare_all("buffer");
    if (cnt4 == 4) mech[M_BUFFULL]++;

    // ---- 5. raw mode with trig_err on channel 30 ----
    set_link(1, 1, 1);
    raw_events.delete();
    fork
      dark(30);
      begin repeat (3) @(posedge clk); hit(30, 2.525, 10, 3.525, 0); end
    join
    hit(31, 1.525, 10, 1.525, 0);
    settle();
    check(raw_events.size() == 2, $sformatf("raw events %0d", raw_events.size()));
    foreach (raw_events[i]) begin
      automatic logic [79:0] w = raw_events[i];
      mech[M_RAW]++;
      if (w[79:74] == 6'd30) begin
        check(w[70] == 1'b1, "trig_err set on channel 30");
        if (w[70]) mech[M_TRIGERR]++;
      end else begin
        check(w[79:74] == 6'd31 && w[70] == 1'b0, "clean raw event on channel 31");
      end
    end

    // ---- 6. overflow: all 64 channels at once on a single SDR link ----
    set_link(0, 0, 0);
    lost_total = 0; slots_total = 0;
    for (int ch = 0; ch < N_CH; ch++) begin
      automatic int c = ch;
      fork hit(c, 2.025, 8, 3.025, 0); join_none
    end
    settle();
    check(slots_total + lost_total == N_CH,
          $sformatf("overflow: %0d sent + %0d lost", slots_total, lost_total));
    check(slots_total <= 24 + 24, "at most 24 events per frame on one SDR link");
    for (int ch = 0; ch < N_CH; ch++) proc_got[ch].delete();

    // ---- 7. test pulse into channels 40..43 ----
    set_link(1, 1, 0);
    for (int ch = 40; ch < 44; ch++) xfer(1, 8'(ch), 32'h8400_0000, r);
    xfer(1, 8'd41, 32'h8780_0000, r);     // channel 41: TAC DAC = -8, conversion 8/256 shorter
    xfer(1, A_TP, 32'h0004_0200, r);      // every 512 cycles, 4 wide
    repeat (3000) @(posedge clk);
    xfer(1, A_TP, 32'h0000_0000, r);
    settle();
    for (int ch = 40; ch < 44; ch++) begin
      check(proc_got[ch].size() >= 4, $sformatf("test pulse events on channel %0d", ch));
      foreach (proc_got[ch][i]) begin
        // edge-aligned pulse: 2 + ceil(250 x (1 + dac/256)), 253 at dac = 0
        check(proc_got[ch][i].t_fine == (ch == 41 ? 8'd245 : 8'd253),
              $sformatf("test pulse fine time %0d on channel %0d", proc_got[ch][i].t_fine, ch));
        if (ch == 41 && proc_got[ch][i].t_fine == 8'd245) mech[M_TACDAC]++;
        check(proc_got[ch][i].tot == 7'd4, "test pulse width as ToT");
        if (i > 0) check(10'(proc_got[ch][i].t_coarse - proc_got[ch][i-1].t_coarse) == 10'd512,
                         "test pulse period");
        mech[M_TESTPULSE]++;
      end
      proc_got[ch].delete();
    end

    // ---- 8. external test pulse swept in phase against the clock ----
    xfer(1, A_GLOBAL, 32'h0008_0047, r);  // 2 links DDR, test pulse from the input pin
    for (int k = 0; k < 8; k++) begin
      automatic realtime phi = 0.025 + 0.8 * k;
      automatic exp_t e;
      @(posedge clk); #(phi);
      stamp(e.tc, e.fid);
      ext_tp = 1;
      repeat (6) @(posedge clk); #(phi) ext_tp = 0;
      e.tf = fine_of(phi); e.ef = e.tf; e.tot = 6;
      for (int ch = 40; ch < 44; ch++) begin
        automatic exp_t ec = e;
        if (ch == 41) begin ec.tf = fine_of(phi, 1.0 - 8.0 / 256.0); ec.ef = ec.tf; end
        expq[ch].push_back(ec);
      end
      repeat (400) @(posedge clk);
    end
    xfer(1, A_GLOBAL, 32'h0008_0007, r);
    settle();
    compare_all("sweep");

    // ---- 9. a full frame: 96 events (64 + 32 buffered) within one frame ----
    for (int ch = 40; ch < 44; ch++) xfer(1, 8'(ch), 32'h8000_0000, r);
    wait (dut.u_gc.coarse_bin == 10'd20);
    for (int k = 0; k < 2; k++) begin
      for (int ch = 0; ch < (k == 0 ? N_CH : 32); ch++) begin
        automatic int c = ch;
        automatic realtime pt = 0.025 + 0.05 * real'($urandom % 120);
        automatic realtime pe = 0.025 + 0.05 * real'($urandom % 120);
        fork hit(c, pt, 4 + ($urandom % 8), pe, 1); join_none
      end
      repeat (30) @(posedge clk);
    end
    settle();
    compare_all("full frame");
    check(mech[M_FULLFRAME] == 1, "one frame carried exactly 96 events with none lost");

    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-22s happened %0d times", mname[i], mech[i]);
      check(mech[i] > 0, {"mechanism never happened: ", mname[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
