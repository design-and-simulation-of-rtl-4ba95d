// hpna_mac_top: HomePNA 2.0 MAC controller.
//
// Connects the four blocks of the controller between the Frame Controller,
// the modem and the Management Block:
//   rx_mac  - classifies Carrier Sense bursts and keeps the MAC time slots;
//   tx_mac  - tells the Frame Controller when to send a frame or a Backoff
//             Signal (TxDataOn, TxSigType) and counts attempts;
//   dfpq    - BL and MBL counters per priority and their controller;
//   prng    - picks the Backoff Signal Slot after a collision;
//   col_compare - the active station's collision check: the header bytes
//             the Frame Controller sent against the same bytes received.
// A collision reaches the Tx MAC and DFPQ either from the header comparison
// (col_detect, also given to the Frame Controller so it cuts the frame to a
// collision fragment) or directly on my_col, from a Frame Controller that
// makes the comparison itself; leave the unused path at 0.
// TxReady, MyCol and SA come from the Frame Controller, TxPriority from the
// Management Block and Carrier Sense from the modem; IFGSync (the start of
// each inter-frame gap) goes back to the modem. The time slot, the received
// signal type and the DFPQ counters are also brought out for monitoring.
// Everything runs on one clock of CLK_MHZ megahertz (the slot timing is
// derived from it) with an asynchronous active-low reset.
module hpna_mac_top
  import hpna_pkg::*;
#(
  parameter int unsigned CLK_MHZ    = 32,
  parameter int unsigned BL_W       = 5,
  parameter int unsigned ATTEMPT_W  = 4,
  parameter int unsigned PRNG_STEPS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // modem
  input  logic                 carrier_sense,
  output logic                 ifg_sync,
  // Frame Controller
  input  logic                 tx_ready,
  input  logic                 my_col,
  input  logic [47:0]          sa,
  input  logic                 hdr_byte_valid,   // one header byte sent/received
  input  logic [7:0]           hdr_tx_byte,
  input  logic [7:0]           hdr_rx_byte,
  output logic                 col_detect,       // header mismatch: cut the frame
  output logic                 tx_data_on,
  output txsig_e               tx_sig_type,
  output logic [ATTEMPT_W-1:0] attempt_limit,
  output logic                 my_pri_slot,
  // Management Block
  input  logic [2:0]           tx_priority,
  // monitoring
  output timeslot_e            time_slot,
  output rxsig_e               rx_sig_type,
  output logic [2:0]           rx_pri,
  output logic                 rx_pri_valid,
  output logic [NUM_PRI-1:0][BL_W-1:0] bl_all,
  output logic [NUM_PRI-1:0][BL_W-1:0] mbl_all
);

  logic            slot_start;
  logic [1:0]      rx_sig_slot;
  logic [BL_W-1:0] bl;
  logic            prng_on;
  logic            prng_complete;
  logic [1:0]      prng_value;
  logic            frame_start;
  logic            col_any;

  assign frame_start = tx_data_on && (tx_sig_type == TX_FRAME);
  assign col_any     = my_col || col_detect;

  rx_mac #(.CLK_MHZ(CLK_MHZ)) u_rx_mac (
    .clk, .rst_n, .carrier_sense,
    .time_slot, .slot_start, .rx_sig_type, .rx_pri, .rx_pri_valid, .rx_sig_slot, .ifg_sync
  );

  tx_mac #(.BL_W(BL_W), .ATTEMPT_W(ATTEMPT_W)) u_tx_mac (
    .clk, .rst_n,
    .tx_ready, .tx_priority, .my_col(col_any), .tx_data_on, .tx_sig_type, .attempt_limit,
    .my_pri_slot,
    .carrier_sense, .time_slot, .slot_start, .rx_sig_type,
    .bl, .prng_on, .prng_value, .prng_complete
  );

  dfpq #(.BL_W(BL_W)) u_dfpq (
    .clk, .rst_n,
    .time_slot, .slot_start, .rx_sig_type, .rx_pri, .rx_pri_valid, .rx_sig_slot,
    .tx_ready, .tx_priority, .my_col(col_any), .prng_value,
    .bl, .bl_all, .mbl_all
  );

  prng #(.PRNG_STEPS(PRNG_STEPS)) u_prng (
    .clk, .rst_n, .sa, .prng_on, .prng_value, .prng_complete
  );

  col_compare u_col_compare (
    .clk, .rst_n, .frame_start, .byte_valid(hdr_byte_valid),
    .tx_byte(hdr_tx_byte), .rx_byte(hdr_rx_byte), .col_detect
  );

endmodule
