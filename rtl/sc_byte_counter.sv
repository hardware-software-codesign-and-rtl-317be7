// sc_byte_counter: number of characters received from the card.
// Incremented once per received character, when the character's data_ready
// window ends, so during data_ready the count equals the 0-based index of
// the character on data_out, and after a 19-character answer to reset it
// reads 19. Cleared by reset and whenever the card is deactivated. The count
// wraps at 2**W. Counting received characters on an 8-bit byte_out follows
// the reader description; the moment of increment matches its software,
// which pairs each byte with the count; clearing on card removal is this
// design's choice.
module sc_byte_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         inc,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)      count <= '0;
    else if (inc) count <= count + 1'b1;
  end

endmodule
