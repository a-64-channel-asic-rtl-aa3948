// tb_event_processor: random raw events in both modes against a reference
// computed here (gray decoding by prefix XOR, modular differences,
// saturation), with random back-pressure on the output.
module tb_event_processor;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  logic raw_mode = 0, in_valid = 0, in_ready, out_valid, out_ready = 0, out_two;
  logic [5:0] in_ch;
  ch_event_t in_ev;
  logic [39:0] s0, s1;

  event_processor dut (.clk, .rst, .raw_mode, .in_valid, .in_ready, .in_ch, .in_ev,
                       .out_valid, .out_ready, .out_two, .out_s0(s0), .out_s1(s1));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int g2b(input logic [9:0] g);
    int b = 0;
    logic acc = 0;
    for (int i = 9; i >= 0; i--) begin acc ^= g[i]; b |= int'(acc) << i; end
    return b;
  endfunction

  function automatic logic [79:0] expected(input logic [5:0] ch, input ch_event_t e, input bit raw);
    int tc, ec, sc, tq, eq, dt, de, tot;
    if (raw) return {ch, e.tac_id, e.frame_id, e.trig_err, 20'h0, e.data};
    tc = g2b(e.data.t_coarse); ec = g2b(e.data.e_coarse); sc = g2b(e.data.soc);
    tq = g2b(e.data.t_eoc); eq = g2b(e.data.e_eoc);
    dt = (tq - sc + 1024) % 1024; de = (eq - sc + 1024) % 1024; tot = (ec - tc + 1024) % 1024;
    if (dt > 255) dt = 255;
    if (de > 255) de = 255;
    if (tot > 127) tot = 127;
    return {ch, e.frame_id, 10'(tc), 8'(dt), 7'(tot), 8'(de), 40'h0};
  endfunction

  logic [79:0] q [$];
  logic [79:0] x;
  bit    qraw [$];

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      x = q.pop_front();
      check(out_two == qraw.pop_front(), "slot count");
      check(s0 == x[79:40], "first slot");
      if (out_two) check(s1 == x[39:0], "second slot");
    end
    out_ready <= ($urandom % 4 != 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      raw_mode = (n >= 300);
      in_valid = 1; in_ch = 6'($urandom); in_ev = {$urandom, $urandom};
      if (n % 5 == 0) begin  // realistic event: small differences
        in_ev.data.soc   = bin2gray(10'($urandom));
        in_ev.data.t_eoc = bin2gray(gray2bin(in_ev.data.soc) + 10'(130 + $urandom % 120));
        in_ev.data.e_eoc = bin2gray(gray2bin(in_ev.data.soc) + 10'(130 + $urandom % 120));
        in_ev.data.e_coarse = bin2gray(gray2bin(in_ev.data.t_coarse) + 10'($urandom % 100));
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      q.push_back(expected(in_ch, in_ev, raw_mode)); qraw.push_back(raw_mode);
      #0.1;
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    check(q.size() == 0, "all events out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
