// sc_convention: direct/inverse convention converter.
// raw holds the 8 data bits in the order they appear on the I/O line (first
// bit in raw[0]) as line levels (high = 1). In direct convention the byte is
// raw itself (LSB first, high = 1). In inverse convention the line carries
// the byte MSB first with low = 1, so the byte is raw bit-reversed and
// inverted. The map is its own inverse, so the same block turns a byte into
// line bits for transmission. Purely combinational. A convention block
// between shift register and data_out is part of the reader description; the
// bit mapping is the one ISO 7816-3 defines, and using it for transmission
// too is this design's choice.
module sc_convention (
  input  logic [7:0] raw,
  input  logic       inverse,
  output logic [7:0] data
);

  always_comb begin
    for (int i = 0; i < 8; i++)
      data[i] = inverse ? ~raw[7 - i] : raw[i];
  end

endmodule
