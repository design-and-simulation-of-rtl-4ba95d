// prng: pseudo-random choice of a Backoff Signal Slot after a collision.
//
// A 48-bit Fibonacci LFSR (feedback from bits 48, 47, 21 and 20) is loaded
// with the station's 48-bit source address SA at its first run after reset,
// so every station on the line follows its own point of the sequence and
// two stations never draw in lockstep. When prng_on is pulsed (the
// station's own transmission collided), the LFSR is clocked PRNG_STEPS
// times and the state reduced modulo 3 is presented on prng_value: the
// index (0, 1 or 2) of the signal slot S0..S2 in which the station sends
// its Backoff Signal. prng_complete is high for one cycle when the new
// value appears; prng_value holds it until the next run. A prng_on that
// arrives while a run is in progress is ignored. An all-zero SA, which
// would lock the LFSR, is replaced by 1.
//
// Timing: the clock edge that samples prng_on starts the run (state
// P_PRNG_EXE); prng_complete and the new prng_value appear PRNG_STEPS clock
// edges later. Sixteen steps matches the step count of the HomePNA 2.0 MAC
// controller this design follows; the LFSR, the seeding from SA and the
// modulo-3 reduction are this design's own choices.
module prng #(
  parameter int unsigned PRNG_STEPS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] sa,            // station source address (seed)
  input  logic        prng_on,       // start a run
  output logic [1:0]  prng_value,    // chosen signal slot, 0..2
  output logic        prng_complete  // one-cycle pulse: prng_value updated
);

  localparam int unsigned CW = $clog2(PRNG_STEPS + 1);

  typedef enum logic {P_READY, P_PRNG_EXE} pstate_e;

  pstate_e       p_state;
  logic [CW-1:0] cnt;
  logic [47:0]   lfsr;
  logic          seeded;   // SA has been loaded since reset

  function automatic logic [47:0] lfsr_next(logic [47:0] v);
    return {v[46:0], v[47] ^ v[46] ^ v[20] ^ v[19]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_state       <= P_READY;
      cnt           <= '0;
      lfsr          <= 48'd1;
      seeded        <= 1'b0;
      prng_value    <= 2'd0;
      prng_complete <= 1'b0;
    end else begin
      prng_complete <= 1'b0;
      case (p_state)
        P_READY: begin
          cnt <= '0;
          if (prng_on) begin
            p_state <= P_PRNG_EXE;
            if (!seeded) begin
              lfsr   <= (sa == '0) ? 48'd1 : sa;
              seeded <= 1'b1;
            end
          end
        end
        P_PRNG_EXE: begin
          lfsr <= lfsr_next(lfsr);
          if (cnt == CW'(PRNG_STEPS - 1)) begin
            p_state       <= P_READY;
            prng_value    <= 2'(lfsr_next(lfsr) % 48'd3);
            prng_complete <= 1'b1;
            cnt           <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: p_state <= P_READY;
      endcase
    end
  end

endmodule
