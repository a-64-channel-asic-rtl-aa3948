// tb_tdc_ctrl: self-checking test of the channel TDC controller.
//
// The testbench runs its own coarse counter (cnt counts clock edges, the
// controller sees its gray code) and replaces both ADCs with a stand-in that
// drops eoc when conversion starts and raises it a chosen number of clock
// edges later. Expected values follow from the specified timing: a trigger
// arriving after edge n is stamped with gray(n + 2), the edge at which the
// TAC stops; t_eoc - soc is the conversion length plus 3 (one cycle to
// start, two synchroniser stages). Covered: a valid event with its fields,
// a dark pulse (rejected, darkcount), trig_err, all three validation modes,
// the quad buffer filling up (a fifth trigger is ignored) and the
// ev_valid/ev_ack handshake.
module tb_tdc_ctrl;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  int unsigned cnt = 0;
  logic [CW-1:0] coarse_gray;
  always @(posedge clk) cnt <= cnt + 1;
  assign coarse_gray = bin2gray(CW'(cnt));

  val_mode_e  val_mode = VAL_SYNC_WINDOW;
  logic [7:0] val_win = 8'd8;
  logic dot = 0, doe = 0, enable = 1;
  logic arm, conv_start, clr;
  logic [TAC_W-1:0] wr_sel, conv_sel, clr_sel;
  logic t_eoc = 1, e_eoc = 1;
  logic ev_valid, ev_ack = 0, darkcount;
  ch_event_t ev;

  tdc_ctrl dut (.clk, .rst, .enable, .val_mode, .val_win, .coarse_gray,
    .frame_lsb(1'b0), .dot, .doe, .arm, .wr_sel, .conv_start, .conv_sel, .clr, .clr_sel,
    .t_eoc_in(t_eoc), .e_eoc_in(e_eoc), .ev_valid, .ev, .ev_ack, .darkcount);

  // ADC stand-in
  int nt = 40, ne = 60;
  always @(posedge clk) begin
    if (conv_start && !rst) begin
      t_eoc <= 0; e_eoc <= 0;
      fork
        begin repeat (nt) @(posedge clk); t_eoc <= 1; end
        begin repeat (ne) @(posedge clk); e_eoc <= 1; end
      join_none
    end
  end

  int checks = 0, failures = 0, darks = 0;
  always @(posedge clk) if (darkcount) darks++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one pulse: DOT rises `d_dot` ns after an edge, DOE high from dt_e cycles
  // after DOT for len_e cycles (len_e = 0: no DOE), DOT stays len_t cycles.
  task automatic pulse(input int dt_e, input int len_e, input int len_t,
                       output int n_dot, output int n_efall);
    @(posedge clk); #1.7;
    dot = 1; n_dot = cnt;
    n_efall = -1;
    fork
      begin repeat (len_t) @(posedge clk); #2.2; dot = 0; end
      begin
        if (len_e > 0) begin
          repeat (dt_e) @(posedge clk); #2.5; doe = 1;
          repeat (len_e) @(posedge clk); #2.5; doe = 0; n_efall = cnt;
        end
      end
    join
  endtask

  task automatic take(input int n_dot, input int n_efall, input int tac, input bit terr,
                      input string tag);
    int w = 0;
    while (!ev_valid && w < 2000) begin @(posedge clk); w++; end
    check(ev_valid, {tag, ": event present"});
    check(ev.data.t_coarse == bin2gray(CW'(n_dot + 2)), {tag, ": t_coarse"});
    check(ev.data.e_coarse == bin2gray(CW'(n_efall + 2)), {tag, ": e_coarse"});
    check(CW'(gray2bin(ev.data.t_eoc) - gray2bin(ev.data.soc)) == CW'(nt + 3), {tag, ": t fine"});
    check(CW'(gray2bin(ev.data.e_eoc) - gray2bin(ev.data.soc)) == CW'(ne + 3), {tag, ": e fine"});
    check(ev.tac_id == TAC_W'(tac), {tag, ": tac id"});
    check(ev.trig_err == terr, {tag, ": trig_err"});
    @(negedge clk); ev_ack = 1; @(negedge clk); ev_ack = 0;
    check(!ev_valid, {tag, ": cleared by ack"});
  endtask

  int a[8], b[8], d0;

  initial begin
    repeat (4) @(posedge clk); rst = 0; repeat (4) @(posedge clk);

    // 1. valid event, synchronous window
    pulse(1, 12, 16, a[0], b[0]);
    take(a[0], b[0], 0, 0, "valid");
    repeat (10) @(posedge clk);

    // 2. dark pulse: DOT only
    d0 = darks;
    pulse(0, 0, 3, a[1], b[1]);
    repeat (30) @(posedge clk);
    check(darks == d0 + 1, "dark pulse counted");
    check(!ev_valid && dut.cst == dut.C_IDLE, "dark pulse produces no event");

    // 3. trig_err: dark pulse then a real event in the same window
    fork
      pulse(0, 0, 1, a[2], b[2]);
      begin repeat (3) @(posedge clk); pulse(1, 10, 12, a[3], b[3]); end
    join
    take(a[2], b[3], 1, 1, "trig_err");
    repeat (10) @(posedge clk);

    // 4. asynchronous validation: accepted when DOE rises while DOT is high
    val_mode = VAL_ASYNC;
    pulse(2, 8, 12, a[4], b[4]);
    take(a[4], b[4], 2, 0, "async ok");
    d0 = darks;
    pulse(4, 6, 2, a[5], b[5]);      // DOT low before DOE rises
    repeat (40) @(posedge clk);
    check(darks == d0 + 1 && !ev_valid, "async rejects late DOE");

    // 5. synchronous sampling: DOE must still be high val_win cycles later
    val_mode = VAL_SYNC_SAMPLE;
    d0 = darks;
    pulse(1, 3, 4, a[5], b[5]);       // DOE too short
    repeat (40) @(posedge clk);
    check(darks == d0 + 1 && !ev_valid, "sample rejects short DOE");
    pulse(1, 20, 22, a[6], b[6]);
    take(a[6], b[6], 3, 0, "sample ok");

    // 6. quad buffer: five events in a row, slow conversions, no ack
    val_mode = VAL_SYNC_WINDOW;
    nt = 150; ne = 160;
    for (int i = 0; i < 5; i++) begin
      pulse(1, 4, 5, a[i], b[i]);
      repeat (3) @(posedge clk);
    end
    check(dut.slot_st[0] != dut.S_FREE && dut.slot_st[1] != dut.S_FREE &&
          dut.slot_st[2] != dut.S_FREE && dut.slot_st[3] != dut.S_FREE, "four TACs busy");
    check(!arm, "no TAC armed when all four are busy");
    for (int i = 0; i < 4; i++) take(a[i], b[i], i, 0, $sformatf("buffer %0d", i));
    repeat (400) @(posedge clk);
    check(!ev_valid, "fifth trigger was not recorded");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
