// col_compare: collision detection of an active (transmitting) station.
//
// While a station sends a frame it also receives the line. The part of the
// frame from the Frame Control field through the Ether-Type field (4 + 6 +
// 6 + 2 = CMP_BYTES = 18 bytes) carries the sender's own addresses, so if
// anything else is on the line the received copy of those bytes differs
// from what was sent. This block compares the two copies byte by byte and
// raises col_detect for one cycle at the first difference; the station
// must then cut its frame to a collision fragment (at most 70 us of
// carrier) and its MAC starts the collision resolution.
//
// Interface and timing: frame_start (one cycle, when the station begins a
// frame) clears the byte count. After it, each cycle with byte_valid high
// presents one sent byte (tx_byte) and the same byte position as received
// (rx_byte), starting with the first Frame Control byte; the Frame
// Controller aligns the two streams. col_detect follows the mismatching
// byte by one clock edge and is given at most once per frame; bytes beyond
// the first CMP_BYTES are ignored.
//
// The compared region follows HomePNA 2.0; the byte-stream interface and
// the alignment being done outside are this design's choices.
module col_compare #(
  parameter int unsigned CMP_BYTES = 18
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic       byte_valid,
  input  logic [7:0] tx_byte,
  input  logic [7:0] rx_byte,
  output logic       col_detect
);

  localparam int unsigned CW = $clog2(CMP_BYTES + 1);

  logic [CW-1:0] n_bytes;   // header bytes compared so far
  logic          flagged;   // a collision was already reported for this frame

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_bytes    <= '0;
      flagged    <= 1'b0;
      col_detect <= 1'b0;
    end else begin
      col_detect <= 1'b0;
      if (frame_start) begin
        n_bytes <= '0;
        flagged <= 1'b0;
      end else if (byte_valid && n_bytes != CW'(CMP_BYTES)) begin
        n_bytes <= n_bytes + 1'b1;
        if (tx_byte != rx_byte && !flagged) begin
          col_detect <= 1'b1;
          flagged    <= 1'b1;
        end
      end
    end
  end

endmodule
