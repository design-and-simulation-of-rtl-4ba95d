// hpna_pkg: types and timing constants shared by the HomePNA 2.0 MAC
// controller blocks.
//
// The MAC timing after a transmission is a fixed sequence of slots: an
// Inter Frame Gap (29 us), three Backoff Signal Slots S0..S2 (32 us each,
// only after a collision), eight Priority Slots numbered 7 down to 0
// (21 us each) and then an unsynchronized period that lasts until the next
// carrier. These durations, the 32 us lower bound of a collision fragment
// and the 92.5 us minimum frame duration are the HomePNA 2.0 figures. All
// durations are given in nanoseconds and turned into clock cycles with
// ns2cyc(); the clock rate itself is a parameter of this design's own
// choosing (32 MHz by default).
package hpna_pkg;

  localparam int unsigned NUM_PRI = 8;   // eight priority levels
  localparam int unsigned NUM_SIG = 3;   // Backoff Signal Slots S0, S1, S2

  // Slot and carrier durations in nanoseconds
  localparam int unsigned CS_IFG_NS_DEF    = 29000;  // Inter Frame Gap
  localparam int unsigned SIG_SLOT_NS_DEF  = 32000;  // one Backoff Signal Slot
  localparam int unsigned PRI_SLOT_NS_DEF  = 21000;  // one Priority Slot
  localparam int unsigned COLL_MIN_NS_DEF  = 32000;  // shortest collision fragment carrier
  localparam int unsigned FRAME_MIN_NS_DEF = 92500;  // shortest Valid CS Frame carrier

  // Clock cycles in a duration of ns nanoseconds at clk_mhz
  function automatic int unsigned ns2cyc(int unsigned ns, int unsigned clk_mhz);
    return (ns * clk_mhz) / 1000;
  endfunction

  // MAC time slot (TimeSlot)
  typedef enum logic [3:0] {
    SLOT_BUSY   = 4'd0,   // carrier present, or waiting for the first carrier after reset
    SLOT_IFG    = 4'd1,
    SLOT_SIG0   = 4'd2,
    SLOT_SIG1   = 4'd3,
    SLOT_SIG2   = 4'd4,
    SLOT_PRI7   = 4'd5,
    SLOT_PRI6   = 4'd6,
    SLOT_PRI5   = 4'd7,
    SLOT_PRI4   = 4'd8,
    SLOT_PRI3   = 4'd9,
    SLOT_PRI2   = 4'd10,
    SLOT_PRI1   = 4'd11,
    SLOT_PRI0   = 4'd12,
    SLOT_UNSYNC = 4'd13   // unsynchronized (arbitrary) period
  } timeslot_e;

  // Received burst classification (RxSigType), valid for one cycle
  typedef enum logic [2:0] {
    RX_NONE    = 3'd0,
    RX_FRAME   = 3'd1,   // Valid CS Frame ended (successful transmission)
    RX_COLL    = 3'd2,   // Valid Collision Fragment ended
    RX_BACKOFF = 3'd3,   // Backoff Signal seen in a signal slot
    RX_NOISE   = 3'd4    // carrier too short to be a collision fragment
  } rxsig_e;

  // What the Frame Controller is told to send (TxSigType)
  typedef enum logic {
    TX_FRAME   = 1'b0,
    TX_BACKOFF = 1'b1
  } txsig_e;

  // Command to one BL or MBL counter of the DFPQ block
  typedef enum logic [1:0] {
    LVL_HOLD = 2'd0,
    LVL_INC  = 2'd1,
    LVL_DEC  = 2'd2,
    LVL_LOAD = 2'd3
  } lvl_op_e;

  // Priority slot number of a slot value (valid for SLOT_PRI7..SLOT_PRI0)
  function automatic logic [2:0] slot_pri(timeslot_e s);
    return 3'(int'(SLOT_PRI0) - int'(s));
  endfunction

  // Slot value of priority slot p
  function automatic timeslot_e pri_slot(logic [2:0] p);
    return timeslot_e'(4'(int'(SLOT_PRI0) - int'(p)));
  endfunction

  // Slot value of signal slot k (0..2)
  function automatic timeslot_e sig_slot(logic [1:0] k);
    return timeslot_e'(4'(int'(SLOT_SIG0) + int'(k)));
  endfunction

endpackage
