// sc_card_model: behavioural model of an ISO 7816-3 T=0 contact card, for
// simulation only (not synthesizable).
// Times everything in card clock cycles. When card_rst rises it waits
// RST_DELAY card clocks, then sends its answer to reset at ETU_ATR clocks per
// etu, one character every 12 etu. The ATR is that of a multi-application
// purse card: 3B BE 95 00 00 41 03 00 00 00 00 00 00 00 00 00 02 90 00
// (TA1 = 95: F = 512, D = 16, so 32 clocks per etu afterwards). With
// inverse_mode set at reset it uses inverse convention (TS = 3F); with
// bad_ts set it sends 55 as TS. After the ATR it receives characters at
// ETU_AFTER clocks per etu, sampling mid-bit and checking parity, logs
// them in rx_log, and after every CMD_LEN characters answers 90 00.
// Falling card_rst aborts whatever the card is doing and releases the line.
// io_out is the card's open-drain output: 0 pulls the line low.
module sc_card_model #(
  parameter int unsigned ETU_ATR   = 372,
  parameter int unsigned ETU_AFTER = 32,
  parameter int unsigned RST_DELAY = 500,
  parameter int unsigned CMD_LEN   = 6
) (
  input  logic card_clk,
  input  logic card_rst,
  input  logic line,
  input  logic inverse_mode,
  input  logic bad_ts,
  output logic io_out
);

  localparam int unsigned ATR_LEN = 19;

  logic [7:0] atr [ATR_LEN] = '{8'h3B, 8'hBE, 8'h95, 8'h00, 8'h00, 8'h41, 8'h03,
                                8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                                8'h00, 8'h00, 8'h02, 8'h90, 8'h00};

  logic [7:0] rx_log [64];
  int         rx_count   = 0;
  int         parity_err = 0;
  int         atr_sent   = 0;
  int         resp_sent  = 0;
  logic       inv;

  initial io_out = 1'b1;

  task automatic wait_clks(input int unsigned n);
    repeat (n) @(posedge card_clk);
  endtask

  // line levels for one byte: bit i of the result goes out i-th
  function automatic logic [7:0] to_line(input logic [7:0] d, input logic inverse);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = inverse ? !d[7-i] : d[i];
    return r;
  endfunction

  task automatic send_char(input logic [7:0] d, input int unsigned etu);
    logic [7:0] lb;
    logic       par;
    lb  = to_line(d, inv);
    par = ^d;                     // even parity over logical ones
    if (inv) par = !par;          // logical 1 is a low level
    io_out = 1'b0;                // start bit
    wait_clks(etu);
    for (int i = 0; i < 8; i++) begin
      io_out = lb[i];
      wait_clks(etu);
    end
    io_out = par;
    wait_clks(etu);
    io_out = 1'b1;                // guard time
    wait_clks(2 * etu);
  endtask

  task automatic recv_char(input int unsigned etu, output logic [7:0] d);
    logic [7:0] lb;
    logic       par;
    int         ones;
    do @(posedge card_clk); while (line !== 1'b0);
    wait_clks(etu / 2);
    for (int i = 0; i < 8; i++) begin
      wait_clks(etu);
      lb[i] = line;
    end
    wait_clks(etu);
    par  = line;
    ones = 0;
    for (int i = 0; i < 8; i++) ones += int'(lb[i]);
    ones += int'(par);
    // even number of high levels in direct, odd in inverse convention
    if ((ones % 2) != (inv ? 1 : 0)) parity_err++;
    d = to_line(lb, inv);
    wait_clks(etu);               // rest of parity etu and into guard time
  endtask

  task automatic session();
    logic [7:0] d;
    int         n = 0;
    inv = inverse_mode;
    wait_clks(RST_DELAY);
    for (int i = 0; i < int'(ATR_LEN); i++) begin
      if (i == 0) d = bad_ts ? 8'h55 : (inv ? 8'h3F : 8'h3B);
      else        d = atr[i];
      send_char(d, ETU_ATR);
    end
    atr_sent++;
    forever begin
      recv_char(ETU_AFTER, d);
      rx_log[rx_count % 64] = d;
      rx_count++;
      n++;
      if (n == int'(CMD_LEN)) begin
        n = 0;
        wait_clks(4 * ETU_AFTER);
        send_char(8'h90, ETU_AFTER);
        send_char(8'h00, ETU_AFTER);
        resp_sent++;
      end
    end
  endtask

  initial begin
    forever begin
      wait (card_rst === 1'b1);
      fork
        session();
        @(negedge card_rst);
      join_any
      disable fork;
      io_out = 1'b1;
      wait (card_rst === 1'b0);
    end
  end

endmodule
