// tb_frame_builder: frames of 1024 cycles are filled with known slots and
// the output (header + slots) is checked frame by frame. Covered: a normal
// frame, overflow at the 24-slot limit of a 1 bit/cycle link (events lost
// and counted), raw two-slot events (kept only whole), the 96-slot limit
// at 4 bits/cycle, an empty frame. The sink takes a slot every
// 40/bits_per_cycle cycles like the serializer, and the whole frame must be
// out before the next boundary.
module tb_frame_builder;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  logic [CW-1:0] cb, cg;
  logic [FW-1:0] fn;
  logic fl, fs;
  coarse_counter cnt (.clk, .rst, .coarse_bin(cb), .coarse_gray(cg), .frame_num(fn),
                      .frame_lsb(fl), .frame_start(fs));

  logic raw_mode = 0, in_valid = 0, in_ready, in_two = 0, out_valid, out_ready;
  logic [2:0] bpc = 1;
  logic [39:0] s0, s1, out_slot;
  logic [7:0] dropped;

  frame_builder dut (.clk, .rst, .frame_start(fs), .frame_num(fn), .raw_mode, .bits_per_cycle(bpc),
    .in_valid, .in_ready, .in_two, .in_s0(s0), .in_s1(s1), .out_valid, .out_ready, .out_slot,
    .frames_dropped(dropped));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sink paced like the serializer
  int pace = 0;
  always @(posedge clk) pace <= (pace + 1) % (40 / int'(bpc));
  assign out_ready = (pace == 0);

  // expected frames: slots written in frame f
  logic [39:0] exp_slots [int][$];
  int exp_lost [int];
  bit exp_raw [int];
  logic [39:0] got [$];
  int frames_seen = 0;

  task automatic wait_frame();
    @(posedge clk); while (!fs) @(posedge clk);
  endtask

  // send n events during the current frame (raw: two slots each)
  task automatic fill(input int n, input bit raw, input int capacity);
    int f;
    int used = 0;
    wait_frame();
    f = int'(fn);
    exp_lost[f] = 0; exp_raw[f] = raw;
    for (int i = 0; i < n; i++) begin
      logic [39:0] a = {$urandom, $urandom}, b = {$urandom, $urandom};
      @(negedge clk); in_valid = 1; in_two = raw; s0 = a; s1 = b;
      @(posedge clk); while (!in_ready) @(posedge clk);
      if (used + (raw ? 2 : 1) <= capacity) begin
        exp_slots[f].push_back(a);
        if (raw) exp_slots[f].push_back(b);
        used += raw ? 2 : 1;
      end else exp_lost[f]++;
    end
    @(negedge clk); in_valid = 0;
  endtask

  // collect output and compare whole frames
  always @(posedge clk) begin
    if (out_valid && out_ready && !rst) begin
      hdr_slot_t h;
      h = hdr_slot_t'(out_slot);
      if (dut.rst_q == dut.R_HDR) begin
        automatic int f = int'(h.frame);
        frames_seen++;
        check(h.tag == HDR_TAG, "header tag");
        if (exp_lost.exists(f)) begin
          check(int'(h.n_slots) == exp_slots[f].size(),
                $sformatf("frame %0d slot count %0d expected %0d", f, h.n_slots, exp_slots[f].size()));
          check(int'(h.lost) == exp_lost[f], $sformatf("frame %0d lost", f));
          check(h.raw == exp_raw[f], "raw flag");
        end else check(h.n_slots == 0, "empty frame");
      end else begin
        got.push_back(out_slot);
      end
    end
  end

  task automatic drain_check(input int f);
    // frame f is sent during frame f + 1
    wait_frame();
    repeat (1021) @(posedge clk);
    check(!out_valid, $sformatf("frame %0d sent within one frame period", f));
    check(got.size() == exp_slots[f].size(), $sformatf("frame %0d slots received", f));
    for (int i = 0; i < got.size() && i < exp_slots[f].size(); i++)
      check(got[i] == exp_slots[f][i], $sformatf("frame %0d slot %0d", f, i));
    got.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    fill(10, 0, 24);           drain_check(1);
    fill(30, 0, 24);           drain_check(3);
    raw_mode = 1;
    fill(13, 1, 24);           drain_check(5);
    raw_mode = 0; bpc = 4;
    fill(100, 0, 96);          drain_check(7);
    bpc = 2;
    fill(60, 0, 50);           drain_check(9);
    check(frames_seen >= 10, "headers for every frame including empty ones");
    check(dropped == 0, "no frame dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
