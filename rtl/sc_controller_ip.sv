// sc_controller_ip: the smart card reader as a processor peripheral (top).
// Wraps smartcard_controller with the slave register file sc_slave_regs so
// that software can reset the reader, poll data_ready/data_out/byte_out and
// write command bytes. Software reads the answer to reset by polling
// register 6 and, whenever data_ready is 1, reading register 7 (the byte)
// and register 8 (its index); a character stays readable for one etu. The
// controller is held in reset while the bus reset or the register reset bit
// is high. The card pins are top-level ports; card_io_I/O/T connect to a
// bidirectional pad outside. rom_write is the switch that sends the stored
// command sequence. The bus port is a plain register interface standing in
// for the processor bus.
module sc_controller_ip #(
  parameter int unsigned CLK_DIV      = 14,
  parameter int unsigned RST_LOW_CLKS = 400
) (
  input  logic        clk,
  input  logic        bus_rst,
  input  logic [3:0]  bus_addr,
  input  logic        bus_wr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  input  logic        card_enable,
  input  logic        rom_write,
  input  logic        card_io_I,
  output logic        card_io_O,
  output logic        card_io_T,
  output logic        card_clk,
  output logic        card_rst,
  output logic        atr_error
);

  logic       reset_button, command_ready;
  logic [7:0] data_in, data_out, byte_out;
  logic       data_ready;
  logic [3:0] protocol;

  sc_slave_regs u_regs (
    .clk, .rst(bus_rst), .bus_addr, .bus_wr, .bus_wdata, .bus_rdata,
    .reset_button, .command_ready, .data_in, .data_ready, .data_out,
    .byte_out, .atr_error, .protocol
  );

  smartcard_controller #(.CLK_DIV(CLK_DIV), .RST_LOW_CLKS(RST_LOW_CLKS)) sc (
    .clk, .reset_button(reset_button || bus_rst), .card_enable, .data_in,
    .Command_ready(command_ready), .rom_write, .card_io_I, .card_io_O,
    .card_io_T, .card_clk, .card_rst, .data_out, .data_ready, .byte_out,
    .atr_error, .protocol
  );

endmodule
