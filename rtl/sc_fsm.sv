// sc_fsm: state machine control of the smart card reader.
// Five states, as in the reader's state diagram:
//   IDLE          - entered on reset_button or when no card is present. The
//                   card clock runs (if a card is present) with card_rst low;
//                   after RST_LOW_CLKS card clocks the reset is released.
//   WaitForData   - card_rst high, line released. A low level on the I/O line
//                   is a start bit: the etu and bit counters are cleared and
//                   ReadData follows. Otherwise a pending command byte is
//                   loaded into the shift register and WriteCommand follows.
//   ReadData      - samples data and parity bits mid-etu (bit 1..9). At the
//                   end of the first guard etu (bit counter reaching 11) the
//                   character is complete.
//   WriteCommand  - drives start, 8 data and parity bits for one etu each,
//                   then releases the line for two guard etu; at the end of
//                   bit 11 the write is complete.
//   ProcessData   - one clk: a received character is handed to the byte
//                   encoder and the ATR parser (capture), a written one is
//                   acknowledged (cmd_ack). Then back to WaitForData.
// Reading has priority over a pending write. Leaving ReadData one etu before
// the end of the frame lets WaitForData catch the next start bit, which may
// follow 12 etu after the previous one. The state list and the write flow
// (bit counter = 11 ends a write) follow the reader description; the exact
// transition conditions and the reset hold time are this design's choices.
module sc_fsm
  import sc_pkg::*;
#(
  parameter int unsigned RST_LOW_CLKS = 400,
  parameter int unsigned FRAME_LEN    = 12
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       card_enable,
  input  logic       line_in,
  input  logic       cmd_pending,
  input  logic       tick,
  input  logic       etu_mid,
  input  logic       etu_done,
  input  logic [3:0] bit_cnt,
  output sc_state_e  state,
  output logic       card_rst,
  output logic       cnt_clear,
  output logic       baud_run,
  output logic       sample,
  output logic       tx_load,
  output logic       tx_shift,
  output logic       drive,
  output logic       capture,
  output logic       cmd_ack
);

  localparam int unsigned RW = $clog2(RST_LOW_CLKS + 1);

  localparam logic [3:0] LAST_DATA_BIT = 4'd9;             // parity
  localparam logic [3:0] LAST_BIT      = 4'(FRAME_LEN - 1);

  sc_state_e     nxt;
  logic [RW-1:0] rst_timer;
  logic          from_read;

  always_comb begin
    nxt       = state;
    cnt_clear = 1'b0;
    tx_load   = 1'b0;
    unique case (state)
      ST_IDLE:
        if (card_enable && tick && rst_timer == RW'(RST_LOW_CLKS - 1))
          nxt = ST_WAIT_FOR_DATA;
      ST_WAIT_FOR_DATA:
        if (!line_in) begin
          nxt       = ST_READ_DATA;
          cnt_clear = 1'b1;
        end else if (cmd_pending) begin
          nxt       = ST_WRITE_COMMAND;
          cnt_clear = 1'b1;
          tx_load   = 1'b1;
        end
      ST_READ_DATA:
        if (etu_done && bit_cnt == LAST_BIT - 4'd1) nxt = ST_PROCESS_DATA;
      ST_WRITE_COMMAND:
        if (etu_done && bit_cnt == LAST_BIT) nxt = ST_PROCESS_DATA;
      ST_PROCESS_DATA:
        nxt = ST_WAIT_FOR_DATA;
      default:
        nxt = ST_IDLE;
    endcase
    if (!card_enable) nxt = ST_IDLE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_IDLE;
      rst_timer <= '0;
      from_read <= 1'b0;
    end else begin
      state <= nxt;
      if (state != ST_IDLE || !card_enable) rst_timer <= '0;
      else if (tick)                        rst_timer <= rst_timer + 1'b1;
      if (state == ST_READ_DATA)     from_read <= 1'b1;
      if (state == ST_WRITE_COMMAND) from_read <= 1'b0;
    end
  end

  assign card_rst = (state != ST_IDLE);
  assign baud_run = (state == ST_READ_DATA) || (state == ST_WRITE_COMMAND);
  assign sample   = (state == ST_READ_DATA) && etu_mid &&
                    (bit_cnt >= 4'd1) && (bit_cnt <= LAST_DATA_BIT);
  assign tx_shift = (state == ST_WRITE_COMMAND) && etu_done;
  assign drive    = (state == ST_WRITE_COMMAND) && (bit_cnt <= LAST_DATA_BIT);
  assign capture  = (state == ST_PROCESS_DATA) && from_read;
  assign cmd_ack  = (state == ST_PROCESS_DATA) && !from_read;

  // The reader only drives the I/O line while it writes a character.
  a_drive_only_in_write: assert property (@(posedge clk) disable iff (rst)
    drive |-> state == ST_WRITE_COMMAND);
  // A write is acknowledged only when its 12 etu have elapsed.
  a_ack_after_frame: assert property (@(posedge clk) disable iff (rst)
    (state == ST_WRITE_COMMAND && nxt == ST_PROCESS_DATA) |-> bit_cnt == LAST_BIT);

endmodule
