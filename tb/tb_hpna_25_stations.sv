// tb_hpna_25_stations: 25 controllers, the HomePNA 2.0 maximum per line.
//
// All 25 stations get a priority-5 frame in the same cycle, so they collide
// and DFPQ has to split them with only three signal slots, which takes
// many repeated collisions. When a station has delivered its first frame it
// gets a second one, which must wait for the end of the running cycle.
// The line model is the same as in tb_hpna_mac_top: 110 us frames, 8 us
// Backoff Signals, header bytes XORed with the other stations' signals for
// the controllers' header comparison, collided frames cut to 60 us.
// Checks: all 50 frames delivered exactly once and intact; the first 25
// deliveries come from 25 different stations (no newcomer enters the
// closed cycle); every station holds the same MBL counters after every
// event; MBL never saturates and returns to 0. The largest MBL, the number
// of collisions and the time taken are printed.
module tb_hpna_25_stations;
  import hpna_pkg::*;

  localparam int N        = 25;
  localparam int BL_W     = 5;
  localparam int PRI      = 5;
  localparam int FRAME_C  = 3520;
  localparam int BS_C     = 256;
  localparam int FRAG_C   = 1920;
  localparam int PRE_C    = 1024;
  localparam int BYTE_C   = 64;
  localparam int HDR_N    = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  logic carrier;

  logic [N-1:0] tx_ready, tx_data_on, ifg_sync, rx_pri_valid, col_detect, my_pri_slot;
  logic [N-1:0] hdr_valid = '0;
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

  int  q [N][$];
  int  rem [N], elapsed [N], hold [N], delivered [N], given [N];
  bit  is_frame [N], overlapped [N], col_sent [N];
  int  order_st[$];
  int  cyc = 0, n_coll = 0, max_mbl = 0;
  logic [N-1:0] pres;
  logic [7:0]   line [N];

  always_comb begin
    carrier = 1'b0;
    for (int i = 0; i < N; i++) if (rem[i] > 0) carrier = 1'b1;
    for (int i = 0; i < N; i++) begin
      tx_ready[i]    = (q[i].size() > 0) && (hold[i] == 0);
      tx_priority[i] = (q[i].size() > 0) ? 3'(q[i][0]) : 3'd0;
    end
  end

  function automatic logic [7:0] hdr_byte(int i, int k);
    if (k < 4)  return (k == 0) ? 8'(8'h10 | PRI) : 8'h00;
    if (k < 10) return 8'hFF;
    if (k < 16) return sa[i][8*(15-k) +: 8];
    return (k == 16) ? 8'h08 : 8'h00;
  endfunction

  always @(posedge clk) begin
    int active;
    cyc++;
    active = 0;
    for (int i = 0; i < N; i++) if (rem[i] > 0) active++;
    for (int i = 0; i < N; i++) begin
      pres[i] = 1'b0;
      line[i] = 8'h00;
      if (rem[i] > 0) begin
        line[i] = 8'hA5;
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
          col_sent[i] = 1'b1;
          rem[i]      = (FRAG_C > elapsed[i]) ? FRAG_C - elapsed[i] : 1;
        end
        rem[i]--;
        if (rem[i] == 0 && is_frame[i] && overlapped[i] && !col_sent[i])
          check(1'b0, $sformatf("station %0d: overlapped frame not caught", i));
        if (rem[i] == 0 && is_frame[i] && !overlapped[i]) begin
          delivered[i]++;
          order_st.push_back(i);
          void'(q[i].pop_front());
          hold[i] = 200;
          if (delivered[i] == 1) begin q[i].push_back(PRI); given[i]++; end
        end
      end
      if (tx_data_on[i]) begin
        check(rem[i] == 0, $sformatf("station %0d starts while still sending", i));
        is_frame[i]   = (tx_sig_type[i] == TX_FRAME);
        rem[i]        = is_frame[i] ? FRAME_C : BS_C;
        elapsed[i]    = 0;
        overlapped[i] = 1'b0;
        col_sent[i]   = 1'b0;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (rx_sig_type[0] == RX_COLL) n_coll++;
      if (int'(mbl_all[0][PRI]) > max_mbl) max_mbl = int'(mbl_all[0][PRI]);
      if (ifg_sync[0] || rx_sig_type[0] == RX_BACKOFF)
        for (int i = 1; i < N; i++)
          check(mbl_all[i] == mbl_all[0], $sformatf("station %0d MBL differs at cycle %0d", i, cyc));
    end
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int i = 0; i < N; i++)
      $display("station %0d: delivered %0d, waiting %0d, BL %0d, MBL %0d, attempts %0d",
               i, delivered[i], q[i].size(), bl_all[i][PRI], mbl_all[i][PRI], attempt_limit[i]);
    $display("deliveries %0d, collisions %0d", order_st.size(), n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_idle();
    for (int i = 0; i < N; i++) if (q[i].size() > 0 || rem[i] > 0) return 1'b0;
    return 1'b1;
  endfunction

  logic [N-1:0] seen = '0;

  initial begin
    for (int i = 0; i < N; i++) begin
      sa[i] = 48'h00A0_0000_0000 | 48'(64'd1 << i);   // one-hot: no XOR of others cancels
      rem[i] = 0; hold[i] = 0; delivered[i] = 0; given[i] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) @(negedge clk);
    for (int i = 0; i < N; i++) begin q[i].push_back(PRI); given[i]++; end
    while (!all_idle()) @(negedge clk);
    repeat (5000) @(negedge clk);

    for (int i = 0; i < N; i++)
      check(delivered[i] == given[i] && given[i] == 2,
            $sformatf("station %0d delivered %0d of %0d frames", i, delivered[i], given[i]));
    for (int k = 0; k < N && k < order_st.size(); k++) begin
      check(!seen[order_st[k]], $sformatf("station %0d served twice in the first cycle", order_st[k]));
      seen[order_st[k]] = 1'b1;
    end
    check(max_mbl < (1 << BL_W) - 1, $sformatf("MBL reached %0d and may have saturated", max_mbl));
    for (int i = 0; i < N; i++)
      check(mbl_all[i] == '0, $sformatf("station %0d MBL not back to 0", i));
    check(n_coll >= N / 2, "many collisions needed to split 25 stations");
    $display("25 stations: %0d collisions, largest MBL %0d, %0d deliveries in %0d us",
             n_coll, max_mbl, order_st.size(), cyc / 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
