// smartcard_controller: ISO 7816-3 contact smart card reader, T=0 character
// level.
// The reader supplies the card clock (board clock / CLK_DIV) and the reset
// line, receives characters on the bidirectional I/O line and sends command
// bytes on it. A received character appears on data_out with data_ready for
// one etu; byte_out counts the received characters. A command byte is
// written by placing it on data_in and pulsing Command_ready (a rising edge
// is taken, so a bit held in a register also works); a rising edge on
// rom_write instead sends the fixed command held in sc_cmd_rom, one byte
// after another.
//
// After reset_button falls with a card present the card clock runs, card_rst
// is held low for RST_LOW_CLKS card clocks and then raised. The card answers
// with its ATR at 372 card clocks per etu; sc_atr_parser picks the convention
// from TS, checks the ATR and, once it is complete, switches the etu to F/D
// from TA1. Every 12-etu character frame is timed by sc_baud_counter and
// sc_bit_counter and sequenced by sc_fsm. The I/O pad is outside: card_io_O
// is the level to drive, card_io_T = 1 releases the line (tristate, the
// card's pull-up makes it high), card_io_I is the line level read back.
//
// The block split, the port names, the divide-by-14 and the 372/TA1 etu
// follow the reader description. The extra ports rom_write, atr_error and
// protocol bring out the ROM trigger, the ATR error flag and the protocol
// named in TD1.
module smartcard_controller
  import sc_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 14,
  parameter int unsigned RST_LOW_CLKS = 400,
  parameter int unsigned ROM_N        = 6,
  parameter logic [8*ROM_N-1:0] ROM_CONTENT = 48'h80_CA_00_00_00_00
) (
  input  logic       clk,
  input  logic       reset_button,
  input  logic       card_enable,
  input  logic [7:0] data_in,
  input  logic       Command_ready,
  input  logic       rom_write,
  input  logic       card_io_I,
  output logic       card_io_O,
  output logic       card_io_T,
  output logic       card_clk,
  output logic       card_rst,
  output logic [7:0] data_out,
  output logic       data_ready,
  output logic [7:0] byte_out,
  output logic       atr_error,
  output logic [3:0] protocol
);

  logic             rst;
  logic [1:0]       io_sync;
  logic             line_in;
  logic             tick;
  logic [ETU_W-1:0] etu_len;
  logic             etu_mid, etu_done;
  logic [3:0]       bit_cnt;
  sc_state_e        state;
  logic             cnt_clear, baud_run, sample, tx_load, tx_shift, drive;
  logic             capture, cmd_ack;
  logic [7:0]       rx_raw, rx_byte, tx_raw;
  logic             tx_bit;
  logic             inverse_now, inverse;
  logic             released;
  logic             deactivated;
  logic             cmd_ready_q, cmd_pending;
  logic [7:0]       cmd_byte;
  logic             rom_req;
  logic [7:0]       rom_byte;

  assign rst         = reset_button;
  assign deactivated = (state == ST_IDLE);

  // two-flop synchronizer for the I/O line (idle high)
  always_ff @(posedge clk) begin
    if (rst) io_sync <= 2'b11;
    else     io_sync <= {io_sync[0], card_io_I};
  end
  assign line_in = io_sync[1];

  sc_clock_divider #(.DIV(CLK_DIV)) u_clkdiv (
    .clk, .rst, .en(card_enable), .card_clk, .tick
  );

  sc_baud_counter #(.W(ETU_W)) u_baud (
    .clk, .rst, .tick, .clear(cnt_clear), .run(baud_run), .etu_len,
    .count(), .mid(etu_mid), .done(etu_done)
  );

  sc_bit_counter #(.FRAME_ETU(FRAME_ETU)) u_bits (
    .clk, .rst, .clear(cnt_clear), .etu_done, .bit_cnt, .last()
  );

  sc_fsm #(.RST_LOW_CLKS(RST_LOW_CLKS), .FRAME_LEN(FRAME_ETU)) u_fsm (
    .clk, .rst, .card_enable, .line_in, .cmd_pending, .tick,
    .etu_mid, .etu_done, .bit_cnt, .state, .card_rst, .cnt_clear, .baud_run,
    .sample, .tx_load, .tx_shift, .drive, .capture, .cmd_ack
  );

  sc_convention u_tx_conv (.raw(cmd_byte), .inverse(inverse), .data(tx_raw));

  sc_shift_register u_sr (
    .clk, .rst, .load(tx_load), .tx_raw, .inverse, .sample, .line_in,
    .shift(tx_shift), .rx_data(rx_raw), .rx_parity(), .tx_bit
  );

  sc_convention u_rx_conv (.raw(rx_raw), .inverse(inverse_now), .data(rx_byte));

  sc_atr_parser #(.MAX_CHARS(ATR_MAX)) u_atr (
    .clk, .rst, .clear(deactivated), .byte_valid(capture), .raw(rx_raw),
    .data(rx_byte), .inverse_now, .inverse, .atr_done(), .atr_error, .etu_len,
    .protocol
  );

  sc_byte_encoder #(.W(ETU_W)) u_enc (
    .clk, .rst, .tick, .etu_len, .capture, .data_in(rx_byte),
    .data_out, .data_ready, .released
  );

  sc_byte_counter #(.W(8)) u_bytes (
    .clk, .rst(rst || deactivated), .inc(released), .count(byte_out)
  );

  sc_cmd_rom #(.N(ROM_N), .CONTENT(ROM_CONTENT)) u_rom (
    .clk, .rst, .start(rom_write), .done(cmd_ack), .req(rom_req),
    .byte_o(rom_byte), .busy()
  );

  // one-byte command buffer between the processor/ROM and the FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_ready_q <= 1'b0;
      cmd_pending <= 1'b0;
      cmd_byte    <= '0;
    end else begin
      cmd_ready_q <= Command_ready;
      if (Command_ready && !cmd_ready_q) begin
        cmd_pending <= 1'b1;
        cmd_byte    <= data_in;
      end else if (rom_req) begin
        cmd_pending <= 1'b1;
        cmd_byte    <= rom_byte;
      end else if (tx_load) begin
        cmd_pending <= 1'b0;
      end
    end
  end

  assign card_io_O = tx_bit;
  assign card_io_T = !drive;

endmodule
