// sc_shift_register: the character shift register shared by receive and
// transmit.
// Receive (serial in, parallel out): each sample pulse shifts the current I/O
// line level into the top of a 10-bit register. The controller samples the 8
// data bits and the parity bit in the middle of each etu, so after nine
// samples rx_data holds the data bits in line order (first bit in rx_data[0])
// and rx_parity the parity bit.
// Transmit: load puts {parity, data, start} in the register, with the start
// bit (low) in bit 0; tx_bit is bit 0 and every shift pulse moves the next
// bit out, filling with high (idle line). tx_raw is already in line order and
// line levels (see sc_convention); the parity level is chosen so that the
// number of logical ones over data and parity is even, which in inverse
// convention (logical 1 = low) means an odd number of high levels.
// Serial-in/parallel-out reception with mid-bit sampling follows the reader
// description; sharing the register for transmission and the parity rule
// are this design's choices.
module sc_shift_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] tx_raw,
  input  logic       inverse,
  input  logic       sample,
  input  logic       line_in,
  input  logic       shift,
  output logic [7:0] rx_data,
  output logic       rx_parity,
  output logic       tx_bit
);

  logic [9:0] sr;
  logic       tx_par;

  assign tx_par = (^tx_raw) ^ inverse;

  always_ff @(posedge clk) begin
    if (rst)         sr <= '1;
    else if (load)   sr <= {tx_par, tx_raw, 1'b0};
    else if (sample) sr <= {line_in, sr[9:1]};
    else if (shift)  sr <= {1'b1, sr[9:1]};
  end

  assign rx_data   = sr[8:1];
  assign rx_parity = sr[9];
  assign tx_bit    = sr[0];

endmodule
