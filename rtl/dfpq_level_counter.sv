// dfpq_level_counter: one Backoff Level or Maximum Backoff Level counter of
// the DFPQ block.
//
// A W-bit counter that resets to 0 and, on each clock edge, holds, counts up
// (saturating at all ones), counts down (saturating at zero) or loads a new
// value, as the DFPQ controller commands through op. The level is available
// on level in the cycle after the command.
module dfpq_level_counter
  import hpna_pkg::*;
#(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  lvl_op_e      op,
  input  logic [W-1:0] load_val,
  output logic [W-1:0] level
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level <= '0;
    end else begin
      case (op)
        LVL_INC:  if (level != '1) level <= level + 1'b1;
        LVL_DEC:  if (level != '0) level <= level - 1'b1;
        LVL_LOAD: level <= load_val;
        default:  level <= level;
      endcase
    end
  end

endmodule
