// tb_test_pulse_gen: the internal pulse has the programmed period and width,
// is off for period 0, and the external pulse is forwarded when selected.
module tb_test_pulse_gen;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;
  logic enable = 1, use_ext = 0, ext = 0, tp;
  logic [15:0] period = 0;
  logic [7:0] width = 0;

  test_pulse_gen dut (.clk, .rst, .enable, .use_ext, .period, .width, .ext_pulse(ext), .tp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int p, input int w);
    int hi, rises, first, last;
    logic prev;
    period = 16'(p); width = 8'(w);
    repeat (2 * p + 5) @(posedge clk);
    hi = 0; rises = 0; first = -1; last = -1; prev = tp;
    for (int i = 0; i < 10 * p; i++) begin
      @(posedge clk); #0.5;
      if (tp) hi++;
      if (tp && !prev) begin rises++; if (first < 0) first = i; last = i; end
      prev = tp;
    end
    check(rises == 10, $sformatf("period %0d: %0d pulses", p, rises));
    check(hi == 10 * w, $sformatf("period %0d: high %0d cycles", p, hi));
    check(last - first == 9 * p, $sformatf("period %0d: spacing", p));
  endtask

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    repeat (20) @(posedge clk);
    check(tp == 0, "no pulse with period 0");
    measure(16, 3);
    measure(100, 37);
    use_ext = 1; #1 ext = 1; #0.1 check(tp == 1, "external pulse forwarded");
    #2 ext = 0; #0.1 check(tp == 0, "external pulse low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
