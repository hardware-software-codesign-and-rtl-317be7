// sc_bit_counter: position of the current etu inside a character frame.
// A character frame is 12 etu long (start bit, 8 data bits, parity bit and
// two etu of guard time). The counter is cleared at the start bit, advances
// on every end-of-etu pulse and wraps from FRAME_ETU-1 back to 0 after the
// whole frame, where last marks the final etu. Index 0 is the start bit,
// 1..8 the data bits, 9 the parity bit and 10..11 the guard time. The
// 12-etu frame follows the reader description; the clear and last flag are
// this design's interface.
module sc_bit_counter #(
  parameter int unsigned FRAME_ETU = 12
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       etu_done,
  output logic [3:0] bit_cnt,
  output logic       last
);

  always_ff @(posedge clk) begin
    if (rst || clear)            bit_cnt <= '0;
    else if (etu_done) begin
      if (last)                  bit_cnt <= '0;
      else                       bit_cnt <= bit_cnt + 1'b1;
    end
  end

  assign last = (bit_cnt == 4'(FRAME_ETU - 1));

endmodule
