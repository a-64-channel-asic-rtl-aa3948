// tb_coarse_counter: the gray code changes one bit per step and decodes to
// the binary count, the count wraps after 2^CW cycles, frame_start marks
// count 0 and the frame number (and frame_lsb) step once per wrap.
module tb_coarse_counter;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;
  logic [CW-1:0] cb, cg;
  logic [FW-1:0] fn;
  logic fl, fs;

  coarse_counter dut (.clk, .rst, .coarse_bin(cb), .coarse_gray(cg), .frame_num(fn),
                      .frame_lsb(fl), .frame_start(fs));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [CW-1:0] pg;
  int unsigned n, starts;

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    check(cb == 0 && cg == 0 && fn == 0 && fs, "reset state");
    n = 0; starts = 0;
    pg = cg;
    for (int i = 1; i <= 3 * 1024 + 5; i++) begin
      @(posedge clk); #1;
      check(cb == CW'(i), "binary count");
      check($countones(cg ^ pg) == 1, "gray step changes one bit");
      check(gray2bin(cg) == cb, "gray decodes to count");
      check(fs == (cb == 0), "frame_start at count 0");
      check(fn == FW'(i / 1024) && fl == fn[0], "frame number");
      if (fs) starts++;
      pg = cg;
    end
    check(starts == 3, "three frame starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
