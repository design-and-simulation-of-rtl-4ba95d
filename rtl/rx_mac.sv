// rx_mac: receive side of the HomePNA 2.0 MAC controller.
//
// Watches Carrier Sense from the modem, classifies every carrier burst and
// keeps the MAC time-slot sequence that all stations share.
//
// Classification (by carrier duration, measured in clock cycles):
//   * a carrier that starts inside a Backoff Signal Slot S0..S2 is a Backoff
//     Signal; it is reported (RX_BACKOFF) when it starts, at most once per
//     slot, and it does not disturb the slot timing;
//   * any other carrier makes the channel busy; when it ends it is a Valid
//     CS Frame if it lasted at least FRAME_MIN_NS (92.5 us), a Valid
//     Collision Fragment if it lasted at least COLL_MIN_NS (32 us), and noise
//     otherwise.
// The end of a busy carrier is the timing reference (ifg_sync pulse). From
// it the block steps through IFG, then S0..S2 if the burst was a collision
// fragment, then priority slots 7..0, then the unsynchronized period, which
// lasts until the next carrier. A carrier that begins in priority slot p is
// recorded as a priority-p transmission (rx_pri = p, rx_pri_valid = 1); one
// that begins in the IFG or the unsynchronized period has no known priority
// (rx_pri_valid = 0, rx_pri = 0).
//
// Interface and timing: carrier_sense is sampled on every rising clock edge
// and is taken to be synchronous to clk. time_slot changes on a clock edge
// and slot_start is high for the first cycle of each slot. rx_sig_type is an
// event, non-RX_NONE for exactly one cycle; rx_pri and rx_pri_valid go with
// RX_FRAME, RX_COLL and RX_NOISE, and rx_sig_slot (0..2) with RX_BACKOFF.
// After reset the block is in the unsynchronized period.
//
// The slot lengths and the duration bounds follow HomePNA 2.0. Marking a
// carrier that starts outside the priority slots as of unknown priority,
// following noise bursts with priority slots only, and reporting a Backoff
// Signal at its leading edge are choices of this design.
module rx_mac
  import hpna_pkg::*;
#(
  parameter int unsigned CLK_MHZ      = 32,
  parameter int unsigned CS_IFG_NS    = hpna_pkg::CS_IFG_NS_DEF,
  parameter int unsigned SIG_SLOT_NS  = hpna_pkg::SIG_SLOT_NS_DEF,
  parameter int unsigned PRI_SLOT_NS  = hpna_pkg::PRI_SLOT_NS_DEF,
  parameter int unsigned COLL_MIN_NS  = hpna_pkg::COLL_MIN_NS_DEF,
  parameter int unsigned FRAME_MIN_NS = hpna_pkg::FRAME_MIN_NS_DEF
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      carrier_sense,
  output timeslot_e time_slot,
  output logic      slot_start,
  output rxsig_e    rx_sig_type,
  output logic [2:0] rx_pri,
  output logic       rx_pri_valid,
  output logic [1:0] rx_sig_slot,
  output logic      ifg_sync
);

  localparam int unsigned IFG_CYC   = ns2cyc(CS_IFG_NS, CLK_MHZ);
  localparam int unsigned SIG_CYC   = ns2cyc(SIG_SLOT_NS, CLK_MHZ);
  localparam int unsigned PRI_CYC   = ns2cyc(PRI_SLOT_NS, CLK_MHZ);
  localparam int unsigned COLL_CYC  = ns2cyc(COLL_MIN_NS, CLK_MHZ);
  localparam int unsigned FRAME_CYC = ns2cyc(FRAME_MIN_NS, CLK_MHZ);

  localparam int unsigned SLOT_MAX = (IFG_CYC > SIG_CYC)
                                   ? ((IFG_CYC > PRI_CYC) ? IFG_CYC : PRI_CYC)
                                   : ((SIG_CYC > PRI_CYC) ? SIG_CYC : PRI_CYC);
  localparam int unsigned SW = $clog2(SLOT_MAX + 1);
  localparam int unsigned DW = $clog2(FRAME_CYC + 1);

  logic [SW-1:0]      slot_cnt;     // cycles spent in the current slot
  logic [DW-1:0]      dur_cnt;      // length of the current carrier, saturating
  logic               after_coll;   // the slot sequence follows a collision
  logic [NUM_SIG-1:0] sig_seen;     // Backoff Signal already reported per signal slot
  logic               cs_q;         // carrier_sense one cycle ago

  // Length of a slot in cycles
  function automatic logic [SW-1:0] slot_len(timeslot_e s);
    case (s)
      SLOT_IFG:                      return SW'(IFG_CYC);
      SLOT_SIG0, SLOT_SIG1, SLOT_SIG2: return SW'(SIG_CYC);
      default:                       return SW'(PRI_CYC);
    endcase
  endfunction

  // Slot that follows s when s runs out
  function automatic timeslot_e next_slot(timeslot_e s, logic coll);
    case (s)
      SLOT_IFG:  return coll ? SLOT_SIG0 : SLOT_PRI7;
      SLOT_SIG0: return SLOT_SIG1;
      SLOT_SIG1: return SLOT_SIG2;
      SLOT_SIG2: return SLOT_PRI7;
      SLOT_PRI0: return SLOT_UNSYNC;
      default:   return timeslot_e'(s + 4'd1);  // PRI7..PRI1 count down the priority
    endcase
  endfunction

  logic in_sig;
  logic [1:0] sig_idx;
  always_comb begin
    in_sig  = (time_slot == SLOT_SIG0) || (time_slot == SLOT_SIG1) || (time_slot == SLOT_SIG2);
    sig_idx = 2'(int'(time_slot) - int'(SLOT_SIG0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      time_slot   <= SLOT_UNSYNC;
      slot_start  <= 1'b0;
      slot_cnt    <= '0;
      dur_cnt     <= '0;
      after_coll  <= 1'b0;
      sig_seen    <= '0;
      cs_q        <= 1'b0;
      rx_sig_type <= RX_NONE;
      rx_pri      <= '0;
      rx_pri_valid <= 1'b0;
      rx_sig_slot <= '0;
      ifg_sync    <= 1'b0;
    end else begin
      cs_q        <= carrier_sense;
      slot_start  <= 1'b0;
      rx_sig_type <= RX_NONE;
      ifg_sync    <= 1'b0;

      if (time_slot == SLOT_BUSY) begin
        if (carrier_sense) begin
          if (dur_cnt != DW'(FRAME_CYC)) dur_cnt <= dur_cnt + 1'b1;
        end else begin
          // carrier ended: classify it and start the slot sequence
          ifg_sync   <= 1'b1;
          time_slot  <= SLOT_IFG;
          slot_start <= 1'b1;
          slot_cnt   <= '0;
          sig_seen   <= '0;
          if (dur_cnt >= DW'(FRAME_CYC)) begin
            rx_sig_type <= RX_FRAME;
            after_coll  <= 1'b0;
          end else if (dur_cnt >= DW'(COLL_CYC)) begin
            rx_sig_type <= RX_COLL;
            after_coll  <= 1'b1;
          end else begin
            rx_sig_type <= RX_NOISE;
            after_coll  <= 1'b0;
          end
        end
      end else if (carrier_sense && !in_sig) begin
        // a transmission starts: note the priority slot it started in
        time_slot <= SLOT_BUSY;
        dur_cnt   <= DW'(1);
        rx_pri_valid <= (time_slot >= SLOT_PRI7 && time_slot <= SLOT_PRI0);
        rx_pri       <= (time_slot >= SLOT_PRI7 && time_slot <= SLOT_PRI0)
                      ? slot_pri(time_slot) : 3'd0;
      end else begin
        if (in_sig && carrier_sense && !cs_q && !sig_seen[sig_idx]) begin
          rx_sig_type       <= RX_BACKOFF;
          rx_sig_slot       <= sig_idx;
          sig_seen[sig_idx] <= 1'b1;
        end
        if (time_slot != SLOT_UNSYNC) begin
          if (slot_cnt == slot_len(time_slot) - 1'b1) begin
            time_slot  <= next_slot(time_slot, after_coll);
            slot_start <= 1'b1;
            slot_cnt   <= '0;
          end else begin
            slot_cnt <= slot_cnt + 1'b1;
          end
        end
      end
    end
  end

endmodule
