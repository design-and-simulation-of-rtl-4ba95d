// dfpq: Distributed Fair Priority Queuing collision resolution block.
//
// Holds one Backoff Level (BL) counter and one Maximum Backoff Level (MBL)
// counter per priority (dfpq_level_counter) and a controller that updates
// them from what the Rx MAC reports. A station may send a frame of priority
// p only while BL[p] is 0; bl is BL of the current transmit priority.
//
// Rules (p is the priority of the event):
//   * Valid Collision Fragment: MBL[p] is decremented if above 0, because
//     the colliding group is about to be replaced by the groups the Backoff
//     Signals create. A waiting station with BL[p] > 0 decrements too. A
//     waiting station at BL 0 that did not take part moves behind all new
//     groups (it tracks MBL[p] until the signal slots are over).
//   * Backoff Signal in slot k: MBL[p] is incremented. A station that took
//     part in the collision (MyCol) and chose slot c increments its BL[p] if
//     k < c; a waiting station that did not take part increments BL[p].
//   * Valid CS Frame (successful transmission): MBL[p] and a waiting
//     station's BL[p] are decremented if above 0.
//   * A priority with no frame waiting keeps BL = MBL, so a frame that
//     arrives joins the end of the running collision resolution cycle.
// Events whose priority is unknown (a carrier that began outside the
// priority slots, and the Backoff Signals after such a collision) change no
// counter: the stations involved still have BL 0 and meet again in their
// priority slot, where the collision is resolved.
// The decrement of MBL on a collision is this design's addition: without
// it a repeated collision among the same stations would leave MBL one too
// high and the next arrival would wait for a transmission that never comes.
//
// Interface and timing: the event inputs come from rx_mac (one event per
// cycle). my_col is the Frame Controller's collision indication for this
// station's own transmission; prng_value is the slot chosen by the PRNG and
// must be stable during the signal slots. Counters change on the clock edge
// that samples the event, so bl is up to date one cycle after it.
module dfpq
  import hpna_pkg::*;
#(
  parameter int unsigned BL_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  // from Rx MAC
  input  timeslot_e        time_slot,
  input  logic             slot_start,
  input  rxsig_e           rx_sig_type,
  input  logic [2:0]       rx_pri,
  input  logic             rx_pri_valid,
  input  logic [1:0]       rx_sig_slot,
  // from Frame Controller, Management Block and PRNG
  input  logic             tx_ready,
  input  logic [2:0]       tx_priority,
  input  logic             my_col,
  input  logic [1:0]       prng_value,
  // to Tx MAC
  output logic [BL_W-1:0]  bl,
  // all counters, for observation
  output logic [NUM_PRI-1:0][BL_W-1:0] bl_all,
  output logic [NUM_PRI-1:0][BL_W-1:0] mbl_all
);

  logic       active;     // this station's frame took part in the collision being resolved
  logic       follow;     // waiting, BL 0, not involved: move behind the new groups
  logic [2:0] coll_pri;   // priority of the collision being resolved
  logic       coll_valid; // that collision began in a priority slot
  logic       ev_frame;   // successful frame of known priority
  logic       ev_coll;    // collision of known priority
  logic       ev_sig;     // Backoff Signal after such a collision

  lvl_op_e  mbl_op [NUM_PRI];
  lvl_op_e  bl_op  [NUM_PRI];
  logic [BL_W-1:0] mbl_next [NUM_PRI];

  // Controller state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      follow   <= 1'b0;
      coll_pri   <= '0;
      coll_valid <= 1'b0;
    end else begin
      if (my_col && tx_ready) active <= 1'b1;
      if (rx_sig_type == RX_COLL) begin
        coll_pri   <= rx_pri;
        coll_valid <= rx_pri_valid;
        if (rx_pri_valid && tx_ready && tx_priority == rx_pri && !active && !my_col && bl == '0)
          follow <= 1'b1;
      end
      // the signal slots are over once priority slot 7 begins
      if ((slot_start && time_slot == SLOT_PRI7) || rx_sig_type == RX_FRAME) begin
        active <= 1'b0;
        follow <= 1'b0;
      end
    end
  end

  // Counter commands
  always_comb begin
    ev_frame = (rx_sig_type == RX_FRAME) && rx_pri_valid;
    ev_coll  = (rx_sig_type == RX_COLL) && rx_pri_valid;
    ev_sig   = (rx_sig_type == RX_BACKOFF) && coll_valid;
    for (int p = 0; p < NUM_PRI; p++) begin
      logic mine;
      mine      = tx_ready && (tx_priority == 3'(p)) && !follow;
      mbl_op[p] = LVL_HOLD;
      if ((ev_frame || ev_coll) && rx_pri == 3'(p)) mbl_op[p] = LVL_DEC;
      if (ev_sig && coll_pri == 3'(p))            mbl_op[p] = LVL_INC;
      // MBL after this cycle's command
      case (mbl_op[p])
        LVL_INC: mbl_next[p] = (mbl_all[p] == '1) ? mbl_all[p] : mbl_all[p] + 1'b1;
        LVL_DEC: mbl_next[p] = (mbl_all[p] == '0) ? mbl_all[p] : mbl_all[p] - 1'b1;
        default: mbl_next[p] = mbl_all[p];
      endcase

      if (!mine) begin
        bl_op[p] = LVL_LOAD;                 // idle priority: BL follows MBL
      end else begin
        bl_op[p] = LVL_HOLD;
        if ((ev_frame || ev_coll) && rx_pri == 3'(p) && !(active || my_col))
          bl_op[p] = LVL_DEC;
        if (ev_sig && coll_pri == 3'(p)) begin
          if (!active) bl_op[p] = LVL_INC;
          else if (rx_sig_slot < prng_value) bl_op[p] = LVL_INC;
        end
      end
    end
  end

  for (genvar p = 0; p < NUM_PRI; p++) begin : g_pri
    dfpq_level_counter #(.W(BL_W)) u_mbl (
      .clk, .rst_n, .op(mbl_op[p]), .load_val('0), .level(mbl_all[p])
    );
    dfpq_level_counter #(.W(BL_W)) u_bl (
      .clk, .rst_n, .op(bl_op[p]), .load_val(mbl_next[p]), .level(bl_all[p])
    );
  end

  assign bl = bl_all[tx_priority];

endmodule
