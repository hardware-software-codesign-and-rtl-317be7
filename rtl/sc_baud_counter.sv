// sc_baud_counter: the etu timer of the reader.
// Counts card clock ticks from 0 to etu_len-1 and wraps, so one wrap is one
// elementary time unit (etu). etu_len is 372 while the answer to reset is
// read and the F/D value taken from TA1 afterwards. mid pulses on the tick
// that reaches etu_len/2 and is used to sample the I/O line in the middle of
// a bit; done pulses on the last tick of the etu. clear restarts the count at
// 0 (the next tick is the first of a new etu); while run is low the count
// holds. Both outputs are combinational and one clk wide. Counting 372
// during the ATR, the value from the ATR afterwards, sampling at mid-count
// and starting on the start bit follow the reader description; counting card
// clock ticks rather than clk cycles is this design's choice.
module sc_baud_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tick,
  input  logic         clear,
  input  logic         run,
  input  logic [W-1:0] etu_len,
  output logic [W-1:0] count,
  output logic         mid,
  output logic         done
);

  logic [W-1:0] half;
  assign half = etu_len >> 1;

  always_ff @(posedge clk) begin
    if (rst || clear)               count <= '0;
    else if (run && tick) begin
      if (count == etu_len - 1'b1)  count <= '0;
      else                          count <= count + 1'b1;
    end
  end

  assign mid  = run && tick && !clear && (count == half - 1'b1);
  assign done = run && tick && !clear && (count == etu_len - 1'b1);

endmodule
