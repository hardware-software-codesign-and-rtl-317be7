// sc_cmd_rom: fixed command sequence written to the card from a switch.
// Holds N command bytes. A rising edge on start begins the sequence: the
// block requests one write at a time (req, one clk, with the byte on byte_o)
// and waits for the controller's write-complete pulse (done) before asking
// for the next byte. busy is high from the start edge to the last done.
// The 6-byte size and the switch trigger follow the reader description; the
// ROM contents are a parameter whose default is a placeholder command
// (first byte in the most significant position).
module sc_cmd_rom #(
  parameter int unsigned N = 6,
  parameter logic [8*N-1:0] CONTENT = 48'h80_CA_00_00_00_00
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       done,
  output logic       req,
  output logic [7:0] byte_o,
  output logic       busy
);

  localparam int unsigned IW = $clog2(N + 1);

  logic [7:0]    rom [N];
  logic [IW-1:0] idx;
  logic          start_q;
  logic          waiting;

  always_comb begin
    for (int i = 0; i < N; i++)
      rom[i] = CONTENT[8*(N-1-i) +: 8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      start_q <= 1'b0;
      busy    <= 1'b0;
      waiting <= 1'b0;
      idx     <= '0;
      req     <= 1'b0;
      byte_o  <= '0;
    end else begin
      start_q <= start;
      req     <= 1'b0;
      if (!busy) begin
        if (start && !start_q) begin
          busy    <= 1'b1;
          waiting <= 1'b0;
          idx     <= '0;
        end
      end else if (!waiting) begin
        if (idx == IW'(N)) begin
          busy <= 1'b0;
        end else begin
          req     <= 1'b1;
          byte_o  <= rom[idx];
          waiting <= 1'b1;
        end
      end else if (done) begin
        waiting <= 1'b0;
        idx     <= idx + 1'b1;
      end
    end
  end

endmodule
