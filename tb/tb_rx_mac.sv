// tb_rx_mac: self-checking testbench of rx_mac at its default 32 MHz clock.
//
// Drives Carrier Sense bursts of chosen lengths and checks, against cycle
// counts worked out from the HomePNA 2.0 durations (IFG 29 us = 928 cycles,
// signal slot 32 us = 1024, priority slot 21 us = 672, collision fragment at
// least 32 us = 1024 cycles, frame at least 92.5 us = 2960 cycles):
//   * the classification of each burst, including the boundary lengths;
//   * the slot sequence and the length of every slot after a frame and after
//     a collision fragment;
//   * Backoff Signals inside signal slots (reported once per slot, slot
//     timing undisturbed) and the priority recorded for a frame that starts
//     in a given priority slot.
module tb_rx_mac;
  import hpna_pkg::*;

  localparam int IFG_C = 928, SIG_C = 1024, PRI_C = 672;

  logic clk = 1'b0, rst_n = 1'b0, cs = 1'b0;
  timeslot_e  time_slot;
  logic       slot_start, ifg_sync;
  rxsig_e     rx_sig_type;
  logic [2:0] rx_pri;
  logic       rx_pri_valid;
  logic [1:0] rx_sig_slot;

  int checks = 0, failures = 0;
  int cyc = 0;

  rx_mac dut (.clk, .rst_n, .carrier_sense(cs), .time_slot, .slot_start,
              .rx_sig_type, .rx_pri, .rx_pri_valid, .rx_sig_slot, .ifg_sync);

  always #5 clk = ~clk;

  // monitors, sampled between clock edges
  timeslot_e slots[$];
  int        slot_at[$];
  rxsig_e    evs[$];
  int        ev_pri[$];
  int        ev_slot[$];
  bit        ev_valid[$];
  int        n_sync = 0;
  always @(negedge clk) begin
    cyc++;
    if (rst_n && slot_start) begin slots.push_back(time_slot); slot_at.push_back(cyc); end
    if (rst_n && rx_sig_type != RX_NONE) begin
      evs.push_back(rx_sig_type); ev_pri.push_back(int'(rx_pri)); ev_slot.push_back(int'(rx_sig_slot));
      ev_valid.push_back(rx_pri_valid);
    end
    if (ifg_sync) n_sync++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic burst(input int n);
    cs = 1'b1;
    repeat (n) @(negedge clk);
    cs = 1'b0;
  endtask

  task automatic wait_slot(input timeslot_e s);
    while (time_slot != s) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // Compare the recorded slots with the expected sequence and lengths
  task automatic check_seq(input timeslot_e exp_s[], input int exp_len[]);
    check(slots.size() >= exp_s.size(), $sformatf("slot count %0d < %0d", slots.size(), exp_s.size()));
    for (int i = 0; i < exp_s.size() && i < slots.size(); i++) begin
      check(slots[i] == exp_s[i], $sformatf("slot %0d is %s, expected %s", i, slots[i].name(), exp_s[i].name()));
      if (i + 1 < slots.size() && i < exp_len.size())
        check(slot_at[i+1] - slot_at[i] == exp_len[i],
              $sformatf("slot %s lasted %0d cycles, expected %0d", exp_s[i].name(), slot_at[i+1] - slot_at[i], exp_len[i]));
    end
    slots.delete(); slot_at.delete();
  endtask

  // pri < 0: the burst began outside the priority slots
  task automatic check_ev(input rxsig_e e, input int pri, input int sslot);
    check(evs.size() > 0, $sformatf("no event, expected %s", e.name()));
    if (evs.size() > 0) begin
      check(evs[0] == e, $sformatf("event %s, expected %s", evs[0].name(), e.name()));
      if (e == RX_BACKOFF) check(ev_slot[0] == sslot, $sformatf("backoff slot %0d, expected %0d", ev_slot[0], sslot));
      else begin
        check(ev_valid[0] == (pri >= 0), $sformatf("rx_pri_valid %0d for expected priority %0d", ev_valid[0], pri));
        if (pri >= 0) check(ev_pri[0] == pri, $sformatf("rx_pri %0d, expected %0d", ev_pri[0], pri));
      end
      void'(evs.pop_front()); void'(ev_pri.pop_front()); void'(ev_slot.pop_front()); void'(ev_valid.pop_front());
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static timeslot_e after_frame[] = '{SLOT_IFG, SLOT_PRI7, SLOT_PRI6, SLOT_PRI5, SLOT_PRI4,
                                 SLOT_PRI3, SLOT_PRI2, SLOT_PRI1, SLOT_PRI0, SLOT_UNSYNC};
    static int frame_len[] = '{IFG_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C};
    static timeslot_e after_coll[] = '{SLOT_IFG, SLOT_SIG0, SLOT_SIG1, SLOT_SIG2, SLOT_PRI7, SLOT_PRI6,
                                SLOT_PRI5, SLOT_PRI4, SLOT_PRI3, SLOT_PRI2, SLOT_PRI1, SLOT_PRI0, SLOT_UNSYNC};
    static int coll_len[] = '{IFG_C, SIG_C, SIG_C, SIG_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C, PRI_C};

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(time_slot == SLOT_UNSYNC, "after reset the channel is unsynchronized");

    // 1. a 100 us frame in the unsynchronized period
    burst(3200);
    repeat (2) @(negedge clk);
    check(time_slot == SLOT_IFG, "IFG after the frame");
    wait_slot(SLOT_UNSYNC);
    check_ev(RX_FRAME, -1, 0);
    check_seq(after_frame, frame_len);

    // 2. a 50 us collision fragment, then Backoff Signals in S1 (twice) and S2
    burst(1600);
    wait_slot(SLOT_SIG1);
    repeat (100) @(negedge clk);
    burst(160);
    repeat (50) @(negedge clk);
    burst(100);
    wait_slot(SLOT_SIG2);
    burst(160);
    wait_slot(SLOT_UNSYNC);
    check_ev(RX_COLL, -1, 0);
    check_ev(RX_BACKOFF, 0, 1);
    check_ev(RX_BACKOFF, 0, 2);
    check(evs.size() == 0, "one Backoff Signal event per slot");
    check_seq(after_coll, coll_len);

    // 3. a frame that starts in priority slot 4, exactly 92.5 us long
    burst(1600);                // collision in the unsynchronized period
    wait_slot(SLOT_PRI4);
    slots.delete(); slot_at.delete();
    check_ev(RX_COLL, -1, 0);
    repeat (10) @(negedge clk);
    burst(2960);
    repeat (3) @(negedge clk);
    check_ev(RX_FRAME, 4, 0);
    wait_slot(SLOT_UNSYNC);
    check_seq(after_frame, frame_len);

    // 4. boundary lengths
    burst(2959);
    repeat (3) @(negedge clk);
    check_ev(RX_COLL, -1, 0);
    wait_slot(SLOT_UNSYNC);
    burst(1024);
    repeat (3) @(negedge clk);
    check_ev(RX_COLL, -1, 0);
    wait_slot(SLOT_UNSYNC);
    slots.delete(); slot_at.delete();
    burst(1023);
    repeat (3) @(negedge clk);
    check_ev(RX_NOISE, -1, 0);
    wait_slot(SLOT_UNSYNC);
    check_seq(after_frame, frame_len);   // no signal slots after noise
    check(n_sync == 7, $sformatf("IFGSync pulses %0d, expected 7", n_sync));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
