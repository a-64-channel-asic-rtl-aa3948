// tb_global_controller: the back end with modelled channel registers.
//
// The testbench configures the chip over SPI, aligns a receiver on the
// training word, then presents random events on random channels (held
// until acknowledged, like the channel data registers) and checks that each
// one arrives, processed as computed here, in the frame stream; then the
// same in raw mode. It also checks frame numbers step by one, the coarse
// time reaching the channels, dark counts readable over SPI, and the test
// pulse and calibration outputs.
module tb_global_controller;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic ext_tp = 0, tp, cal_pulse;
  logic [5:0] cal_amp;
  logic [CW-1:0] coarse_gray;
  logic frame_lsb;
  ch_cfg_t ch_cfg [N_CH];
  logic [7:0] val_win;
  logic [N_CH-1:0] ev_valid = '0, ev_ack, darkcount = '0;
  ch_event_t ev [N_CH];
  logic [1:0][1:0] txd;
  logic [1:0] txclk;

  global_controller dut (.clk, .rst, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi),
    .spi_miso(miso), .ext_test_pulse(ext_tp), .test_pulse(tp), .cal_pulse, .cal_amp,
    .coarse_gray, .frame_lsb, .ch_cfg, .val_win, .ev_valid, .ev, .ev_ack, .darkcount,
    .txd, .txclk);

  logic two = 0, ddr = 0, align = 1, locked, wv;
  logic [39:0] word;
  tx_receiver rx (.clk, .txd, .two, .ddr, .align, .locked, .word_valid(wv), .word);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  function automatic int g2b(input logic [9:0] g);
    int b = 0;
    logic acc = 0;
    for (int i = 9; i >= 0; i--) begin acc ^= g[i]; b |= int'(acc) << i; end
    return b;
  endfunction

  function automatic logic [39:0] proc_of(input int ch, input ch_event_t e);
    int tc = g2b(e.data.t_coarse), ec = g2b(e.data.e_coarse), sc = g2b(e.data.soc);
    int dt = (g2b(e.data.t_eoc) - sc + 1024) % 1024, de = (g2b(e.data.e_eoc) - sc + 1024) % 1024;
    int tot = (ec - tc + 1024) % 1024;
    return {6'(ch), e.frame_id, 10'(tc), 8'(dt > 255 ? 255 : dt), 7'(tot > 127 ? 127 : tot),
            8'(de > 255 ? 255 : de)};
  endfunction

  // channel register models
  ch_event_t chq [N_CH][$];
  always @(posedge clk) begin
    for (int i = 0; i < N_CH; i++) begin
      if (ev_ack[i]) begin
        check(ev_valid[i], "ack to valid channel");
        void'(chq[i].pop_front());
      end
    end
  end
  always @(negedge clk) for (int i = 0; i < N_CH; i++) begin
    ev_valid[i] = chq[i].size() > 0;
    if (ev_valid[i]) ev[i] = chq[i][0];
  end

  // frame stream parser
  logic [39:0] expq [$];
  bit raw_now = 0;
  int in_frame = 0, last_frame = -1, headers = 0, got = 0;
  logic [39:0] first_half;
  bit half = 0;
  always @(posedge clk) if (wv && word != TRAIN_WORD) begin
    if (in_frame == 0) begin
      if (word != IDLE_WORD) begin
        automatic hdr_slot_t h = hdr_slot_t'(word);
        check(h.tag == HDR_TAG, "header tag");
        if (last_frame >= 0) check(int'(h.frame) == last_frame + 1, "frame numbers consecutive");
        check(h.lost == 0, "nothing lost");
        last_frame = int'(h.frame);
        in_frame = int'(h.n_slots);
        headers++;
      end
    end else begin
      in_frame--;
      check(expq.size() > 0 && (word == expq[0]), "slot matches event");
      if (expq.size() > 0) void'(expq.pop_front());
      got++;
    end
  end

  logic [31:0] r;
  int nsent;

  initial begin
    repeat (4) @(posedge clk); rst = 0;
    // 2 links DDR, training on
    xfer(1, A_GLOBAL, 32'h0008_000F, r);
    two = 1; ddr = 1;
    wait (locked);
    repeat (20) @(posedge clk);
    align = 0;
    xfer(1, A_GLOBAL, 32'h0008_0007, r);
    // processed events, all must arrive in order of pick-up
    nsent = 0;
    for (int n = 0; n < 300; n++) begin
      automatic int ch = $urandom % N_CH;
      automatic ch_event_t e = {$urandom, $urandom};
      @(negedge clk);
      chq[ch].push_back(e);
      nsent++;
      repeat ($urandom % 30) @(negedge clk);
    end
    wait (got >= 1);
    repeat (3000) @(posedge clk);
    check(got == 300, $sformatf("processed events delivered %0d", got));
    // raw mode: two slots per event
    xfer(1, A_GLOBAL, 32'h0008_0017, r);
    raw_now = 1;
    repeat (2100) @(posedge clk);
    got = 0;
    for (int n = 0; n < 40; n++) begin
      automatic int ch = $urandom % N_CH;
      automatic ch_event_t e = {$urandom, $urandom};
      @(negedge clk);
      chq[ch].push_back(e);
      repeat (30) @(negedge clk);
    end
    repeat (3000) @(posedge clk);
    check(got == 80, $sformatf("raw slots delivered %0d", got));
    check(headers > 10, "frames sent");
    // coarse time distribution
    @(negedge clk);
    check(g2b(coarse_gray) == int'(dut.coarse_bin), "gray coarse time to channels");
    // dark counts
    @(negedge clk); darkcount[9] = 1; repeat (5) @(negedge clk); darkcount[9] = 0;
    xfer(0, A_DARK + 8'd9, 0, r);
    check(r == 5, "dark counter over SPI");
    // test pulse
    ch_cfg_dummy();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected slots are recorded when the arbiter takes an event
  always @(posedge clk) begin
    for (int i = 0; i < N_CH; i++) if (ev_ack[i]) begin
      if (raw_now) begin
        automatic logic [79:0] w = {6'(i), ev[i].tac_id, ev[i].frame_id, ev[i].trig_err, 20'h0, ev[i].data};
        expq.push_back(w[79:40]); expq.push_back(w[39:0]);
      end else expq.push_back(proc_of(i, ev[i]));
    end
  end

  task automatic ch_cfg_dummy();
    int hi = 0;
    xfer(1, A_TP, 32'h2803_0020, r);        // period 32, width 3, amplitude 10
    xfer(1, 8'd4, 32'h8800_0000, r);        // channel 4: calibration injection on
    repeat (320) begin @(posedge clk); #0.1; if (tp) hi++; end
    check(hi == 30, $sformatf("test pulse duty %0d", hi));
    check(cal_amp == 6'd10, "calibration amplitude");
    wait (tp); #0.1 check(cal_pulse, "calibration pulse follows test pulse");
    check(ch_cfg[4].cal_enable && !ch_cfg[5].cal_enable, "channel configuration out");
  endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
