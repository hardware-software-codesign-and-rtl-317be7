// sc_byte_encoder: presents each received character to the processor.
// On capture it copies the decoded byte to data_out, raises data_ready and
// keeps both for one etu, counted in card clock ticks with the etu length in
// force at capture time. Afterwards data_out returns to 00 and data_ready
// falls; released pulses for one clk at that moment (the byte counter uses it
// to advance). A new capture during the window restarts it with the new byte.
// Holding the byte for one etu follows the reader description; clearing
// data_out between bytes follows its simulation waveform.
module sc_byte_encoder #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tick,
  input  logic [W-1:0] etu_len,
  input  logic         capture,
  input  logic [7:0]   data_in,
  output logic [7:0]   data_out,
  output logic         data_ready,
  output logic         released
);

  logic [W-1:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out   <= '0;
      data_ready <= 1'b0;
      remaining  <= '0;
    end else if (capture) begin
      data_out   <= data_in;
      data_ready <= 1'b1;
      remaining  <= etu_len;
    end else if (data_ready && tick) begin
      if (remaining == W'(1)) begin
        data_out   <= '0;
        data_ready <= 1'b0;
      end
      remaining <= remaining - 1'b1;
    end
  end

  assign released = data_ready && tick && !capture && (remaining == W'(1));

endmodule
