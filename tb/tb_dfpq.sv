// tb_dfpq: self-checking testbench of the DFPQ block.
//
// Plays the Rx MAC's events (collision, Backoff Signals, successful frames,
// slot changes) directly into the block and compares every BL and MBL
// counter with values worked out by hand from the DFPQ rules:
//   A. this station collides at priority 7 with two others and chooses S1:
//      signals in S0, S1, S2 give MBL 3 and BL 1; three successes bring
//      BL to 0 after the first and MBL back to 0, with BL following MBL once
//      the frame is gone;
//   B. a station that arrives during a resolution cycle at priority 5 joins
//      its end (BL = MBL = 2), stays behind through a repeated collision of
//      the group ahead (MBL 2 -> 1 -> 3, BL 2 -> 1 -> 3) and reaches BL 0
//      only after the three frames ahead of it;
//   C. a waiting station at BL 0 that was not in a collision at priority 3
//      moves behind the new groups;
//   D. a collision, signals and a frame of unknown priority change nothing;
// and that events of one priority leave the other priorities' counters
// alone.
module tb_dfpq;
  import hpna_pkg::*;

  localparam int BL_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  timeslot_e  time_slot = SLOT_UNSYNC;
  logic       slot_start = 1'b0;
  rxsig_e     rx_sig_type = RX_NONE;
  logic [2:0] rx_pri = '0;
  logic       rx_pri_valid = 1'b1;
  logic [1:0] rx_sig_slot = '0;
  logic       tx_ready = 1'b0;
  logic [2:0] tx_priority = '0;
  logic       my_col = 1'b0;
  logic [1:0] prng_value = '0;
  logic [BL_W-1:0] bl;
  logic [NUM_PRI-1:0][BL_W-1:0] bl_all, mbl_all;

  int checks = 0, failures = 0;

  dfpq dut (.clk, .rst_n, .time_slot, .slot_start, .rx_sig_type, .rx_pri, .rx_pri_valid,
                           .rx_sig_slot, .tx_ready, .tx_priority, .my_col, .prng_value,
                           .bl, .bl_all, .mbl_all);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic ev(input rxsig_e t, input int p, input int k = 0);
    rx_sig_type = t;
    rx_pri      = 3'(p);
    rx_sig_slot = 2'(k);
    if (t == RX_BACKOFF) time_slot = sig_slot(2'(k));
    if (t == RX_FRAME || t == RX_COLL) time_slot = SLOT_IFG;
    tick();
    rx_sig_type = RX_NONE;
    tick(3);
  endtask

  task automatic to_pri7();
    time_slot  = SLOT_PRI7;
    slot_start = 1'b1;
    tick();
    slot_start = 1'b0;
    tick(2);
  endtask

  // expected BL and MBL of priority p
  task automatic expect_lv(input int p, input int e_bl, input int e_mbl, input string tag);
    check(int'(bl_all[p]) == e_bl, $sformatf("%s: BL[%0d]=%0d, expected %0d", tag, p, bl_all[p], e_bl));
    check(int'(mbl_all[p]) == e_mbl, $sformatf("%s: MBL[%0d]=%0d, expected %0d", tag, p, mbl_all[p], e_mbl));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(2);
    rst_n = 1'b1;
    tick(2);
    for (int p = 0; p < 8; p++) expect_lv(p, 0, 0, "reset");

    // ---- A: active station at priority 7, chooses S1
    tx_ready = 1'b1; tx_priority = 3'd7; prng_value = 2'd1;
    tick();
    check(bl == '0, "A: ready at BL 0");
    my_col = 1'b1; tick(); my_col = 1'b0;
    ev(RX_COLL, 7);
    expect_lv(7, 0, 0, "A collision");
    ev(RX_BACKOFF, 7, 0);
    expect_lv(7, 1, 1, "A signal S0");
    ev(RX_BACKOFF, 7, 1);
    expect_lv(7, 1, 2, "A signal S1 (own)");
    ev(RX_BACKOFF, 7, 2);
    expect_lv(7, 1, 3, "A signal S2");
    to_pri7();
    check(int'(bl) == 1, "A: bl output is BL[7]");
    for (int p = 0; p < 7; p++) expect_lv(p, 0, 0, "A other priority");
    ev(RX_FRAME, 7);
    expect_lv(7, 0, 2, "A first success");
    ev(RX_FRAME, 7);                       // own frame
    expect_lv(7, 0, 1, "A own success");
    tx_ready = 1'b0;
    tick(2);
    expect_lv(7, 1, 1, "A idle BL follows MBL");
    ev(RX_FRAME, 7);
    expect_lv(7, 0, 0, "A cycle closed");

    // ---- B: station joins a running cycle at priority 5
    tx_priority = 3'd5;
    ev(RX_COLL, 5);
    ev(RX_BACKOFF, 5, 0);
    ev(RX_BACKOFF, 5, 2);
    to_pri7();
    expect_lv(5, 2, 2, "B idle station tracks MBL");
    tx_ready = 1'b1;
    tick(2);
    expect_lv(5, 2, 2, "B frame arrives");
    ev(RX_COLL, 5);                        // the group at BL 0 collides again
    expect_lv(5, 1, 1, "B repeated collision");
    ev(RX_BACKOFF, 5, 0);
    ev(RX_BACKOFF, 5, 1);
    to_pri7();
    expect_lv(5, 3, 3, "B after signals");
    expect_lv(7, 0, 0, "B priority 7 untouched");
    ev(RX_FRAME, 5);
    expect_lv(5, 2, 2, "B success 1");
    ev(RX_FRAME, 5);
    expect_lv(5, 1, 1, "B success 2");
    ev(RX_FRAME, 5);
    expect_lv(5, 0, 0, "B success 3");
    check(bl == '0, "B: may send now");
    ev(RX_FRAME, 5);                       // own frame
    expect_lv(5, 0, 0, "B own success");
    tx_ready = 1'b0;

    // ---- C: waiting at BL 0, not in the collision at priority 3
    tx_priority = 3'd3; tx_ready = 1'b1;
    tick(2);
    ev(RX_COLL, 3);
    ev(RX_BACKOFF, 3, 0);
    ev(RX_BACKOFF, 3, 1);
    to_pri7();
    expect_lv(3, 2, 2, "C moved behind the new groups");
    ev(RX_FRAME, 3);
    ev(RX_FRAME, 3);
    expect_lv(3, 0, 0, "C reaches BL 0");
    ev(RX_NOISE, 3);
    expect_lv(3, 0, 0, "C noise changes nothing");
    tx_ready = 1'b0;

    // ---- D: a collision and signals of unknown priority change nothing
    rx_pri_valid = 1'b0;
    ev(RX_COLL, 0);
    ev(RX_BACKOFF, 0, 0);
    ev(RX_BACKOFF, 0, 1);
    to_pri7();
    ev(RX_FRAME, 0);
    rx_pri_valid = 1'b1;
    expect_lv(0, 0, 0, "D unknown priority");
    for (int p = 0; p < 8; p++) if (p != 3) expect_lv(p, 0, 0, "end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
