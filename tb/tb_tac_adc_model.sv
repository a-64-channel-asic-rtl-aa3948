// tb_tac_adc_model: checks the behavioural TAC/ADC branch model.
//
// A trigger arriving phi ns after a clock edge charges the TAC until the
// second following edge, q = 2T - phi; a conversion then keeps eoc low for
// GAIN x q. The test triggers each of the four TACs at a different phase,
// converts them in turn and measures the eoc low time against 125 x q. It
// also checks that an unarmed trigger and a second trigger on a written TAC
// are ignored, and that clr empties a TAC (its conversion is then ~0).
module tb_tac_adc_model;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T = 6.25;
  logic clk = 0;
  always #(T/2) clk = ~clk;

  logic trig = 0, arm = 0, conv_start = 0, clr = 0;
  logic [1:0] wr_sel = 0, conv_sel = 0, clr_sel = 0;
  logic eoc;
  logic [5:0] dac = '0;

  tac_adc_model dut (.clk, .trig, .arm, .wr_sel, .conv_start, .conv_sel, .clr, .clr_sel, .dac, .eoc);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hit(input int sel, input realtime phi);
    @(posedge clk); wr_sel = 2'(sel); arm = 1;
    #(phi) trig = 1;
    #1 arm = 0;
    #1 trig = 0;
  endtask

  task automatic convert(input int sel, input realtime expect_len, input string tag);
    realtime t0, t1;
    @(negedge clk); conv_sel = 2'(sel); conv_start = 1;
    @(negedge clk); conv_start = 0;
    check(eoc == 0, {tag, ": eoc low while converting"});
    t0 = $realtime - T / 2;  // conversion started at the rising edge
    @(posedge eoc); t1 = $realtime;
    check((t1 - t0) > expect_len - 0.01 && (t1 - t0) < expect_len + 0.01,
          $sformatf("%s: length %0.3f expected %0.3f", tag, t1 - t0, expect_len));
  endtask

  realtime phis [4] = '{0.5, 2.0, 3.7, 5.9};

  initial begin
    repeat (3) @(posedge clk);
    check(eoc == 1, "eoc idle high");
    for (int i = 0; i < 4; i++) hit(i, phis[i]);
    // second trigger on TAC 0 must not overwrite it
    hit(0, 3.0);
    // trigger with arm low is ignored
    @(posedge clk); wr_sel = 1; #1 trig = 1; #1 trig = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4; i++)
      convert(i, 125.0 * (2 * T - phis[i]), $sformatf("tac %0d", i));
    // clr empties TAC 2
    @(negedge clk); clr_sel = 2; clr = 1; @(negedge clk); clr = 0;
    @(negedge clk); conv_sel = 2; conv_start = 1;
    @(negedge clk); conv_start = 0;
    check(eoc == 1, "cleared tac converts to nothing");
    // after clr TAC 2 can be written again
    hit(2, 1.0);
    repeat (3) @(posedge clk);
    convert(2, 125.0 * (2 * T - 1.0), "rewritten tac");
    // the calibration DAC stretches or shortens the conversion by dac/256
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); clr_sel = 2'(i); clr = 1; @(negedge clk); clr = 0;
    end
    hit(0, 2.0); hit(1, 2.0);
    repeat (3) @(posedge clk);
    dac = 6'd16;        // +16/256
    convert(0, 125.0 * (2 * T - 2.0) * (1.0 + 16.0 / 256.0), "dac +16");
    dac = 6'h30;        // -16/256
    convert(1, 125.0 * (2 * T - 2.0) * (1.0 - 16.0 / 256.0), "dac -16");
    dac = '0;
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
