// tb_tx_mac: self-checking testbench of tx_mac.
//
// Plays the time-slot sequence, the DFPQ level and the PRNG directly and
// checks when TxDataOn is raised and with which TxSigType:
//   * a priority-4 frame starts exactly one cycle after priority slot 4
//     begins, not in the slots before it;
//   * after MyCol the PRNG is started once, the Backoff Signal is sent one
//     cycle after the chosen signal slot (S2) begins and AttemptLimit
//     counts it;
//   * BL above 0 and a sensed carrier both hold the frame back, and a
//     frame that missed its slot is sent in the unsynchronized period;
//   * after a successful frame AttemptLimit returns to 0 and nothing more is
//     sent until TxReady drops;
//   * a collision followed directly by priority slots returns to waiting.
module tb_tx_mac;
  import hpna_pkg::*;

  localparam int BL_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_ready = 1'b0, my_col = 1'b0, carrier_sense = 1'b0;
  logic [2:0] tx_priority = 3'd4;
  logic tx_data_on;
  txsig_e tx_sig_type;
  logic [3:0] attempt_limit;
  logic my_pri_slot;
  timeslot_e time_slot = SLOT_BUSY;
  logic slot_start = 1'b0;
  rxsig_e rx_sig_type = RX_NONE;
  logic [BL_W-1:0] bl = '0;
  logic prng_on;
  logic [1:0] prng_value = '0;
  logic prng_complete = 1'b0;

  int checks = 0, failures = 0;
  int n_on = 0, n_prng = 0;
  int last_on_cyc, cyc = 0, slot_cyc;

  tx_mac dut (.clk, .rst_n, .tx_ready, .tx_priority, .my_col, .tx_data_on,
                             .tx_sig_type, .attempt_limit, .my_pri_slot, .carrier_sense, .time_slot,
                             .slot_start, .rx_sig_type, .bl, .prng_on, .prng_value,
                             .prng_complete);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    cyc++;
    if (tx_data_on) begin n_on++; last_on_cyc = cyc; end
    if (prng_on) n_prng++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // enter slot s for n cycles
  task automatic slot(input timeslot_e s, input int n = 8);
    time_slot  = s;
    slot_start = 1'b1;
    slot_cyc   = cyc + 1;
    tick();
    slot_start = 1'b0;
    tick(n - 1);
  endtask

  task automatic pri_slots(input int upto);   // PRI7 down to PRIupto
    for (int p = 7; p >= upto; p--) slot(pri_slot(3'(p)));
  endtask

  task automatic rx_event(input rxsig_e t);
    rx_sig_type = t;
    tick();
    rx_sig_type = RX_NONE;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(2);
    rst_n = 1'b1;
    tick(2);

    // nothing is sent without a frame
    slot(SLOT_IFG); pri_slots(0); slot(SLOT_UNSYNC);
    check(n_on == 0, "no TxDataOn without TxReady");

    // frame at priority 4
    tx_ready = 1'b1;
    slot(SLOT_BUSY); slot(SLOT_IFG);
    pri_slots(5);
    check(n_on == 0, "no TxDataOn before priority slot 4");
    check(!my_pri_slot, "MyPRI_Slot low in priority slot 5");
    slot(SLOT_PRI4);
    check(my_pri_slot, "MyPRI_Slot high in priority slot 4");
    check(n_on == 1, "frame started in priority slot 4");
    check(last_on_cyc == slot_cyc + 1, $sformatf("TxDataOn %0d cycles after the slot began, expected 1", last_on_cyc - slot_cyc));
    check(tx_sig_type == TX_FRAME, "TxSigType is Frame");
    slot(SLOT_BUSY);

    // collision: PRNG, Backoff Signal in S2
    my_col = 1'b1; tick(); my_col = 1'b0;
    tick(2);
    check(n_prng == 1, "PRNG started once");
    prng_value = 2'd2; prng_complete = 1'b1; tick(); prng_complete = 1'b0;
    rx_event(RX_COLL);
    slot(SLOT_IFG); slot(SLOT_SIG0); slot(SLOT_SIG1);
    check(n_on == 1, "no Backoff Signal before S2");
    slot(SLOT_SIG2);
    check(n_on == 2, "Backoff Signal sent in S2");
    check(last_on_cyc == slot_cyc + 1, "Backoff Signal one cycle after S2 began");
    check(tx_sig_type == TX_BACKOFF, "TxSigType is Backoff Signal");
    check(attempt_limit == 4'd1, $sformatf("AttemptLimit %0d, expected 1", attempt_limit));

    // BL above 0 holds the frame back
    bl = 5'd1;
    pri_slots(0);
    check(n_on == 2, "BL 1: frame held back");
    slot(SLOT_UNSYNC);
    check(n_on == 2, "BL 1: not sent in the unsynchronized period either");
    // carrier sensed at the start of the slot: defer
    slot(SLOT_BUSY); rx_event(RX_FRAME); bl = '0;
    slot(SLOT_IFG); pri_slots(5);
    carrier_sense = 1'b1;
    slot(SLOT_PRI4);
    carrier_sense = 1'b0;
    check(n_on == 2, "deferred to a carrier");
    for (int p = 3; p >= 0; p--) slot(pri_slot(3'(p)));
    check(n_on == 2, "missed slot");
    slot(SLOT_UNSYNC);
    check(n_on == 3 && tx_sig_type == TX_FRAME, "sent in the unsynchronized period");
    slot(SLOT_BUSY);
    rx_event(RX_FRAME);                        // success
    tick();
    check(attempt_limit == 4'd0, "AttemptLimit cleared after success");
    slot(SLOT_IFG); pri_slots(0); slot(SLOT_UNSYNC);
    check(n_on == 3, "nothing more until TxReady drops");
    tx_ready = 1'b0; tick(2);

    // collision with no signal slots after it
    tx_ready = 1'b1; tick(3);
    check(n_on == 4, "next frame sent in the unsynchronized period");
    slot(SLOT_BUSY);
    my_col = 1'b1; tick(); my_col = 1'b0;
    prng_complete = 1'b1; tick(); prng_complete = 1'b0;
    rx_event(RX_NOISE);
    slot(SLOT_IFG); pri_slots(5);
    check(n_on == 4 && n_prng == 2, "no Backoff Signal without signal slots");
    slot(SLOT_PRI4);
    check(n_on == 5 && tx_sig_type == TX_FRAME, "frame retried in its priority slot");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
