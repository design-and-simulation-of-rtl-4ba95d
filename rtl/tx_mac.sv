// tx_mac: transmit timing of the HomePNA 2.0 MAC controller.
//
// Tells the Frame Controller exactly when to start sending (tx_data_on, a
// one-cycle pulse) and what to send (tx_sig_type: a frame or a Backoff
// Signal), following the slot sequence kept by rx_mac:
//   * a frame waiting (tx_ready) at priority tx_priority is started on the
//     first cycle of priority slot tx_priority, or at any cycle of the
//     unsynchronized period, provided the DFPQ Backoff Level of that
//     priority is 0 and no carrier is sensed; a carrier that appears
//     earlier ends the slot sequence, so the station defers;
//   * when the Frame Controller reports a collision of this station's frame
//     (my_col), the block starts the PRNG (prng_on) and, on the first cycle
//     of the signal slot S0..S2 the PRNG chose, sends a Backoff Signal and
//     counts it in attempt_limit; the frame then waits for its slot again;
//   * a Valid CS Frame reported by rx_mac while this station is sending is
//     its successful transmission: attempt_limit returns to 0 and no new
//     frame is started until the Frame Controller drops tx_ready (its
//     transmit FIFO is empty).
// my_pri_slot (MyPRI_Slot) is high throughout the priority slot of
// tx_priority. attempt_limit (AttemptLimit) saturates at all ones; tx_sig_type holds the
// type of the last tx_data_on. What to do when AttemptLimit grows is left to
// the Frame Controller.
//
// The signals and their meaning follow the HomePNA 2.0 MAC controller this
// design is modelled on; the state encoding, the counter width and the
// one-pulse form of tx_data_on are this design's choices.
module tx_mac
  import hpna_pkg::*;
#(
  parameter int unsigned BL_W      = 5,
  parameter int unsigned ATTEMPT_W = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Frame Controller and Management Block
  input  logic                 tx_ready,
  input  logic [2:0]           tx_priority,
  input  logic                 my_col,
  output logic                 tx_data_on,
  output txsig_e               tx_sig_type,
  output logic [ATTEMPT_W-1:0] attempt_limit,
  output logic                 my_pri_slot,   // the current slot is this station's priority slot
  // modem
  input  logic                 carrier_sense,
  // Rx MAC
  input  timeslot_e            time_slot,
  input  logic                 slot_start,
  input  rxsig_e               rx_sig_type,
  // DFPQ
  input  logic [BL_W-1:0]      bl,
  // PRNG
  output logic                 prng_on,
  input  logic [1:0]           prng_value,
  input  logic                 prng_complete
);

  typedef enum logic [2:0] {T_IDLE, T_WAIT, T_TX, T_BACKOFF, T_DONE} tstate_e;

  tstate_e t_state;
  logic    prng_done;   // PRNG has delivered the slot for this backoff

  logic may_send;
  always_comb begin
    my_pri_slot = (time_slot == pri_slot(tx_priority));
    may_send = (bl == '0) && !carrier_sense &&
               ((slot_start && time_slot == pri_slot(tx_priority)) ||
                time_slot == SLOT_UNSYNC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_state       <= T_IDLE;
      prng_done     <= 1'b0;
      tx_data_on    <= 1'b0;
      tx_sig_type   <= TX_FRAME;
      attempt_limit <= '0;
      prng_on       <= 1'b0;
    end else begin
      tx_data_on <= 1'b0;
      prng_on    <= 1'b0;
      if (prng_complete) prng_done <= 1'b1;

      case (t_state)
        T_IDLE: begin
          attempt_limit <= '0;
          if (tx_ready) t_state <= T_WAIT;
        end
        T_WAIT: begin
          if (!tx_ready) begin
            t_state <= T_IDLE;
          end else if (may_send) begin
            tx_data_on  <= 1'b1;
            tx_sig_type <= TX_FRAME;
            t_state     <= T_TX;
          end
        end
        T_TX: begin
          if (my_col) begin
            prng_on   <= 1'b1;
            prng_done <= 1'b0;
            t_state   <= T_BACKOFF;
          end else if (rx_sig_type == RX_FRAME) begin
            t_state <= T_DONE;
          end else if (rx_sig_type == RX_COLL || rx_sig_type == RX_NOISE) begin
            t_state <= T_WAIT;   // ended without a collision report: try again
          end
        end
        T_BACKOFF: begin
          if (prng_done && slot_start && time_slot == sig_slot(prng_value)) begin
            tx_data_on  <= 1'b1;
            tx_sig_type <= TX_BACKOFF;
            if (attempt_limit != '1) attempt_limit <= attempt_limit + 1'b1;
            t_state     <= T_WAIT;
          end else if (slot_start && time_slot == SLOT_PRI7) begin
            t_state <= T_WAIT;   // no signal slots followed: contend again
          end
        end
        T_DONE: begin
          attempt_limit <= '0;
          if (!tx_ready) t_state <= T_IDLE;
        end
        default: t_state <= T_IDLE;
      endcase
    end
  end

endmodule
