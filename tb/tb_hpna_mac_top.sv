// tb_hpna_mac_top: end-to-end test of the MAC controller on a shared line.
//
// Four complete controllers (hpna_mac_top, default parameters, 32 MHz) sit
// on one phone line. The testbench stands in for each station's Frame
// Controller and modem: on TxDataOn it puts a carrier on the line, 110 us
// for a frame and 8 us for a Backoff Signal; Carrier Sense is the OR of all
// carriers. After the 32 us preamble each frame presents its 18 header
// bytes (Frame Control, DA, SA, Ether-Type; one byte per 2 us) to the
// controller's header comparison, together with the bytes "received": its
// own bytes XORed with whatever the other stations put on the line at that
// moment (replaced by a complement where those happen to cancel). A frame whose header comparison reports a collision is cut to a
// 60 us collision fragment. A frame that ends without overlap is delivered:
// the station takes it off its queue and drops TxReady for a while.
//
// Traffic:
//   1. all four stations get a priority-2 frame in the same cycle while the
//      line is unsynchronized (station 0 gets a second one behind it): they
//      collide outside the priority slots, retry in priority slot 2, collide
//      again and are put in order by DFPQ. With four stations and three
//      signal slots at least two share a slot, so a repeated collision
//      within the resolution cycle always happens;
//   2. after its first delivery station 3 gets a priority-6 frame, which
//      must overtake the waiting priority-2 frames, and then another
//      priority-2 frame, which must join the end of the running cycle;
//   3. when everything is delivered, station 1 gets a priority-1 frame in
//      the unsynchronized period and sends it at once.
// Checks: every frame is delivered exactly once and intact; the first four
// priority-2 deliveries come from four different stations (the resolution
// cycle is closed); the priority-6 frame is the very next delivery after
// station 3's first, ahead of the priority-2 frames still waiting; all stations hold identical MBL
// counters after every event and all return to 0. Each mechanism (collision
// outside and inside the priority slots, repeated collision, Backoff Signal,
// waiting at BL > 0, overtaking by a higher priority, unsynchronized
// access, AttemptLimit above 0) is counted and must occur at least once.
module tb_hpna_mac_top;
  import hpna_pkg::*;

  localparam int N        = 4;
  localparam int BL_W     = 5;
  localparam int FRAME_C  = 3520;   // 110 us frame
  localparam int BS_C     = 256;    // 8 us Backoff Signal
  localparam int PRE_C    = 1024;   // 16-byte preamble, 32 us
  localparam int BYTE_C   = 64;     // one header byte, 2 us
  localparam int HDR_N    = 18;     // Frame Control .. Ether-Type
  localparam int FRAG_C   = 1920;   // collided frame cut to 60 us

  logic clk = 1'b0, rst_n = 1'b0;
  logic carrier;

  logic [N-1:0] tx_ready, tx_data_on, ifg_sync, rx_pri_valid;
  logic [N-1:0] hdr_valid = '0, col_detect, my_pri_slot;
  logic [7:0]   hdr_tx [N], hdr_rx [N];
  logic [2:0]   tx_priority [N];
  logic [47:0]  sa [N];
  txsig_e       tx_sig_type [N];
  logic [3:0]   attempt_limit [N];
  timeslot_e    time_slot [N];
  rxsig_e       rx_sig_type [N];
  logic [2:0]   rx_pri [N];
  logic [NUM_PRI-1:0][BL_W-1:0] bl_all [N];
  logic [NUM_PRI-1:0][BL_W-1:0] mbl_all [N];

  for (genvar i = 0; i < N; i++) begin : g_st
    hpna_mac_top u_mac (
      .clk, .rst_n, .carrier_sense(carrier), .ifg_sync(ifg_sync[i]),
      .tx_ready(tx_ready[i]), .my_col(1'b0), .sa(sa[i]),
      .hdr_byte_valid(hdr_valid[i]), .hdr_tx_byte(hdr_tx[i]), .hdr_rx_byte(hdr_rx[i]),
      .col_detect(col_detect[i]),
      .tx_data_on(tx_data_on[i]), .tx_sig_type(tx_sig_type[i]),
      .attempt_limit(attempt_limit[i]), .my_pri_slot(my_pri_slot[i]), .tx_priority(tx_priority[i]),
      .time_slot(time_slot[i]), .rx_sig_type(rx_sig_type[i]), .rx_pri(rx_pri[i]),
      .rx_pri_valid(rx_pri_valid[i]), .bl_all(bl_all[i]), .mbl_all(mbl_all[i])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- stations' Frame Controllers and the line
  int  q [N][$];          // priorities of the frames waiting at each station
  int  rem [N];           // cycles of carrier still to send
  int  elapsed [N];
  bit  is_frame [N], overlapped [N], col_sent [N];
  int  hold [N];          // cycles TxReady stays low after a delivery
  int  delivered [N];
  int  given [N];
  int  order_st[$], order_pri[$];
  int  cyc = 0;
  logic [N-1:0] pres;
  logic [7:0]   line [N];

  // mechanism counters
  int n_coll_pri = 0, n_coll_unsync = 0, n_repeat = 0, n_backoff = 0, n_bl_wait = 0;
  int n_overtake = 0, n_unsync_tx = 0, n_attempt = 0, n_hdr_col = 0;

  // header byte k of station i's current frame
  function automatic logic [7:0] hdr_byte(int i, int k);
    if (k < 4)  return (k == 0) ? 8'(8'h10 | q[i][0]) : 8'h00;   // Frame Control
    if (k < 10) return 8'hFF;                                     // DA: broadcast
    if (k < 16) return sa[i][8*(15-k) +: 8];                      // SA
    return (k == 16) ? 8'h08 : 8'h00;                             // Ether-Type
  endfunction

  always_comb begin
    carrier = 1'b0;
    for (int i = 0; i < N; i++) if (rem[i] > 0) carrier = 1'b1;
    for (int i = 0; i < N; i++) begin
      tx_ready[i]    = (q[i].size() > 0) && (hold[i] == 0);
      tx_priority[i] = (q[i].size() > 0) ? 3'(q[i][0]) : 3'd0;
    end
  end

  task automatic give(input int st, input int pri);
    q[st].push_back(pri);
    given[st]++;
  endtask

  always @(posedge clk) begin
    int active;
    cyc++;
    active = 0;
    for (int i = 0; i < N; i++) if (rem[i] > 0) active++;
    // what each station puts on the line this cycle, as a byte
    for (int i = 0; i < N; i++) begin
      pres[i] = 1'b0;
      line[i] = 8'h00;
      if (rem[i] > 0) begin
        line[i] = 8'hA5;   // preamble, payload or Backoff Signal
        if (is_frame[i] && elapsed[i] >= PRE_C && (elapsed[i] - PRE_C) % BYTE_C == 0
            && (elapsed[i] - PRE_C) / BYTE_C < HDR_N) begin
          pres[i] = 1'b1;
          line[i] = hdr_byte(i, (elapsed[i] - PRE_C) / BYTE_C);
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      logic [7:0] others;
      bit         busy;
      others = 8'h00;
      busy   = 1'b0;
      for (int j = 0; j < N; j++)
        if (j != i && rem[j] > 0) begin others ^= line[j]; busy = 1'b1; end
      if (busy && others == 8'h00) others = 8'hFF;   // signals that happen to cancel still corrupt
      hdr_valid[i] <= pres[i];
      hdr_tx[i]    <= line[i];
      hdr_rx[i]    <= line[i] ^ others;
    end
    for (int i = 0; i < N; i++) begin
      if (hold[i] > 0) hold[i]--;
      if (rem[i] > 0) begin
        elapsed[i]++;
        if (is_frame[i] && active > 1) overlapped[i] = 1'b1;
        if (is_frame[i] && col_detect[i] && !col_sent[i]) begin
          n_hdr_col++;
          col_sent[i] = 1'b1;
          rem[i]      = (FRAG_C > elapsed[i]) ? FRAG_C - elapsed[i] : 1;
        end
        rem[i]--;
        if (rem[i] == 0 && is_frame[i] && overlapped[i] && !col_sent[i])
          check(1'b0, $sformatf("station %0d: overlapped frame not caught by the header check", i));
        if (rem[i] == 0 && is_frame[i] && !overlapped[i]) begin
          // delivered intact
          delivered[i]++;
          order_st.push_back(i);
          order_pri.push_back(q[i][0]);
          if (q[i][0] > 2) begin
            for (int j = 0; j < N; j++)
              if (j != i && q[j].size() > 0 && q[j][0] < q[i][0] && bl_all[j][q[j][0]] == '0)
                n_overtake++;
          end
          void'(q[i].pop_front());
          hold[i] = 200;
          if (i == 3 && delivered[3] == 1) begin give(3, 6); give(3, 2); end
        end
      end
      if (tx_data_on[i]) begin
        check(rem[i] == 0, $sformatf("station %0d starts while still sending", i));
        is_frame[i]   = (tx_sig_type[i] == TX_FRAME);
        rem[i]        = is_frame[i] ? FRAME_C : BS_C;
        elapsed[i]    = 0;
        overlapped[i] = 1'b0;
        col_sent[i]   = 1'b0;
        if (is_frame[i] && time_slot[i] == SLOT_UNSYNC && q[i].size() > 0 && q[i][0] == 1) n_unsync_tx++;
        if (is_frame[i] && time_slot[i] != SLOT_UNSYNC)
          check(my_pri_slot[i], $sformatf("station %0d sends a frame outside its priority slot", i));
      end
      if (attempt_limit[i] != 0) n_attempt++;
    end
  end

  // ---------------- observation through station 0
  always @(negedge clk) begin
    if (rst_n) begin
      if (rx_sig_type[0] == RX_COLL) begin
        if (rx_pri_valid[0]) begin
          n_coll_pri++;
          if (mbl_all[0][rx_pri[0]] != 0) n_repeat++;
        end else n_coll_unsync++;
      end
      if (rx_sig_type[0] == RX_BACKOFF) n_backoff++;
      for (int i = 0; i < N; i++)
        if (tx_ready[i] && time_slot[i] == pri_slot(tx_priority[i]) && bl_all[i][tx_priority[i]] != 0
            && g_st[0].u_mac.u_rx_mac.slot_start)
          n_bl_wait++;
      // every station keeps the same MBL counters
      if (ifg_sync[0] || rx_sig_type[0] == RX_BACKOFF) begin
        for (int i = 1; i < N; i++)
          check(mbl_all[i] == mbl_all[0], $sformatf("station %0d MBL differs from station 0 at cycle %0d", i, cyc));
      end
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] seen;
  int n2 = 0, pos6 = -1, pos3 = -1;

  function automatic bit all_idle();
    for (int i = 0; i < N; i++) if (q[i].size() > 0 || rem[i] > 0) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      sa[i] = 48'h00A0_C912_3400 | 48'(1 << i);
      rem[i] = 0; hold[i] = 0; delivered[i] = 0; given[i] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) @(negedge clk);

    // 1. four priority-2 frames at once, a second one at station 0
    for (int i = 0; i < N; i++) give(i, 2);
    give(0, 2);
    while (!all_idle()) @(negedge clk);
    while (time_slot[0] != SLOT_UNSYNC) @(negedge clk);
    repeat (50) @(negedge clk);

    // 3. a frame in the unsynchronized period
    give(1, 1);
    while (!all_idle()) @(negedge clk);
    repeat (5000) @(negedge clk);

    // deliveries
    for (int i = 0; i < N; i++)
      check(delivered[i] == given[i], $sformatf("station %0d delivered %0d of %0d frames", i, delivered[i], given[i]));
    begin
      seen = '0;
      for (int k = 0; k < order_st.size(); k++) begin
        if (order_pri[k] == 2 && n2 < 4) begin
          check(!seen[order_st[k]], $sformatf("station %0d delivered twice in the first round", order_st[k]));
          seen[order_st[k]] = 1'b1;
          n2++;
        end
        if (order_pri[k] == 6) pos6 = k;
        if (order_st[k] == 3 && pos3 < 0) pos3 = k;
      end
      check(n2 == 4, "four first-round priority-2 deliveries");
      check(pos6 >= 0 && pos6 == pos3 + 1, "priority 6 is delivered next, ahead of the waiting priority-2 frames");
      $display("delivery order (station:priority):");
      for (int k = 0; k < order_st.size(); k++) $display("  %0d:%0d", order_st[k], order_pri[k]);
    end
    for (int i = 0; i < N; i++)
      check(mbl_all[i] == '0, $sformatf("station %0d MBL not back to 0", i));

    check(n_hdr_col > 0, "header comparison caught a collision");
    $display("mechanisms: hdr_col=%0d coll_pri=%0d coll_unsync=%0d repeat=%0d backoff=%0d bl_wait=%0d overtake=%0d unsync_tx=%0d attempt=%0d",
             n_hdr_col, n_coll_pri, n_coll_unsync, n_repeat, n_backoff, n_bl_wait, n_overtake, n_unsync_tx, n_attempt);
    check(n_coll_pri > 0, "collision in a priority slot happened");
    check(n_coll_unsync > 0, "collision in the unsynchronized period happened");
    check(n_repeat > 0, "repeated collision happened");
    check(n_backoff > 0, "Backoff Signals happened");
    check(n_bl_wait > 0, "waiting at BL > 0 happened");
    check(n_overtake > 0, "overtaking by a higher priority happened");
    check(n_unsync_tx > 0, "unsynchronized access happened");
    check(n_attempt > 0, "AttemptLimit above 0 happened");
    $display("finished at cycle %0d (%0d us)", cyc, cyc / 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
