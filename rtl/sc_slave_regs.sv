// sc_slave_regs: processor-visible registers of the smart card peripheral.
// A word-addressed register port (index 0..15) in place of the processor
// bus. Register 9 is the control register written by software; registers
// 6, 7 and 8 read back data_ready, data_out and byte_out (the byte counter);
// register 10 reads the ATR status (bit 0 atr_error, bits 7:4 protocol).
// Other indices read 0. Control bit positions in register 9, little-endian:
//   bit 31    reset_button (holds the controller in reset while 1)
//   bit 30    Command_ready
//   bits 29:22 data_in
// which are bits 0, 1 and 2..9 in the bus's MSB-first numbering. Writes take
// effect on the next clk; reads are combinational. Register numbers and bit
// positions follow the peripheral's software; the status register at 10 is
// this design's addition.
module sc_slave_regs (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  bus_addr,
  input  logic        bus_wr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        reset_button,
  output logic        command_ready,
  output logic [7:0]  data_in,
  input  logic        data_ready,
  input  logic [7:0]  data_out,
  input  logic [7:0]  byte_out,
  input  logic        atr_error,
  input  logic [3:0]  protocol
);

  localparam logic [3:0] REG_DATA_READY = 4'd6;
  localparam logic [3:0] REG_DATA_OUT   = 4'd7;
  localparam logic [3:0] REG_BYTE_OUT   = 4'd8;
  localparam logic [3:0] REG_CONTROL    = 4'd9;
  localparam logic [3:0] REG_STATUS     = 4'd10;

  logic [31:0] slv_reg9;

  always_ff @(posedge clk) begin
    if (rst)                                   slv_reg9 <= '0;
    else if (bus_wr && bus_addr == REG_CONTROL) slv_reg9 <= bus_wdata;
  end

  assign reset_button  = slv_reg9[31];
  assign command_ready = slv_reg9[30];
  assign data_in       = slv_reg9[29:22];

  always_comb begin
    unique case (bus_addr)
      REG_DATA_READY: bus_rdata = {31'd0, data_ready};
      REG_DATA_OUT:   bus_rdata = {24'd0, data_out};
      REG_BYTE_OUT:   bus_rdata = {24'd0, byte_out};
      REG_CONTROL:    bus_rdata = slv_reg9;
      REG_STATUS:     bus_rdata = {24'd0, protocol, 3'd0, atr_error};
      default:        bus_rdata = '0;
    endcase
  end

endmodule
