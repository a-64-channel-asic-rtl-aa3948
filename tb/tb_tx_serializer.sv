// tb_tx_serializer: for each link mode (1 link SDR, 1 link DDR, 2 links SDR,
// 2 links DDR) random slots are sent and the bit stream is rebuilt from
// txd using the stated order (k-th bit of a cycle on link k mod links, half
// k div links); the rebuilt 40-bit words must equal the slots sent, at one
// slot every 40/bits_per_cycle cycles. Also checked: SDR repeats the bit in
// both halves, an unused link stays low, idle words between slots, the
// training word in training mode and the forwarded clock pattern.
module tb_tx_serializer;
  import tofpet_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  logic enable = 0, two = 0, ddr = 0, train = 0, clk_en = 0;
  logic in_valid = 0, in_ready;
  logic [39:0] in_slot;
  logic [1:0][1:0] txd;
  logic [1:0] txclk;

  tx_serializer dut (.clk, .rst, .enable, .two_links(two), .ddr, .train, .clk_en,
                     .in_valid, .in_ready, .in_slot, .txd, .txclk);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [39:0] sendq [$];
  logic [39:0] words [$];
  logic [39:0] acc;
  int nbits = 0, loads = 0, last_load = -1, cyc = 0;
  bit spacing_ok = 1;
  bit collecting = 0, arm_collect = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // source
  always_comb begin
    in_valid = sendq.size() > 0;
    in_slot  = in_valid ? sendq[0] : '0;
  end
  always @(posedge clk) if (in_ready && in_valid) begin
    void'(sendq.pop_front());
    if (last_load >= 0 && cyc - last_load != 40 / ((two ? 2 : 1) * (ddr ? 2 : 1))) spacing_ok = 0;
    last_load = cyc;
  end

  // receiver
  always @(negedge clk) begin
    if (arm_collect && dut.left == 6'd40) begin collecting = 1; arm_collect = 0; end
    if (collecting) begin
    automatic int L = two ? 2 : 1;
    automatic int b = L * (ddr ? 2 : 1);
    if (!ddr) begin
      if (txd[0][0] != txd[0][1] || txd[1][0] != txd[1][1]) spacing_ok = 0;
    end
    if (!two && txd[1] != 2'b00) spacing_ok = 0;
    for (int k = 0; k < b; k++) begin
      acc = {acc[38:0], txd[k % L][k / L]};
      nbits++;
      if (nbits == 40) begin words.push_back(acc); nbits = 0; end
    end
    end
  end

  task automatic run_mode(input bit t2, input bit d2, input string tag);
    logic [39:0] sent [$];
    int skip;
    two = t2; ddr = d2;
    repeat (45) @(posedge clk);  // the slot in flight ends in the old mode
    words.delete(); nbits = 0; last_load = -1; spacing_ok = 1;
    // let the previous slot finish, then align on a slot boundary
    arm_collect = 1;
    wait (collecting);
    for (int i = 0; i < 20; i++) begin
      logic [39:0] w = {$urandom, $urandom};
      if (w == 0) w = 1;
      sent.push_back(w); sendq.push_back(w);
    end
    repeat (22 * 40) @(posedge clk);
    collecting = 0;
    // skip the idle word(s) before the first slot
    skip = 0;
    while (skip < words.size() && words[skip] == IDLE_WORD) skip++;
    for (int i = 0; i < 20; i++)
      check(words.size() > skip + i && words[skip + i] == sent[i], $sformatf("%s: slot %0d", tag, i));
    check(words.size() > skip + 20 && words[skip + 20] == IDLE_WORD, {tag, ": idle after data"});
    check(spacing_ok, {tag, ": slot spacing and line format"});
  endtask

  initial begin
    repeat (3) @(posedge clk); @(negedge clk); rst = 0; enable = 1;
    run_mode(0, 0, "1 link SDR");
    run_mode(0, 1, "1 link DDR");
    run_mode(1, 0, "2 links SDR");
    run_mode(1, 1, "2 links DDR");
    // training
    train = 1; two = 0; ddr = 0;
    repeat (80) @(posedge clk);
    words.delete(); nbits = 0;
    arm_collect = 1;
    wait (collecting);
    repeat (120) @(posedge clk);
    collecting = 0;
    check(words.size() == 3 && words[0] == TRAIN_WORD && words[2] == TRAIN_WORD, "training word");
    check(txclk == 2'b00, "no clock unless enabled");
    clk_en = 1; #1 check(txclk == 2'b01, "forwarded clock pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
