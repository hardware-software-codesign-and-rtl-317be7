// tb_sc_slave_regs: writes random values to the control register and checks
// reset_button (bit 31), Command_ready (bit 30) and data_in (bits 29:22);
// drives random status inputs and reads them back at registers 6, 7, 8 and
// 10; checks that other registers read 0, that writes elsewhere leave the
// control register alone, and that reset clears it.
module tb_sc_slave_regs;
  logic clk = 1'b0, rst, bus_wr;
  logic [3:0] bus_addr, protocol;
  logic [31:0] bus_wdata, bus_rdata;
  logic reset_button, command_ready, data_ready, atr_error;
  logic [7:0] data_in, data_out, byte_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_slave_regs dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v, last;
    rst = 1'b1; bus_wr = 1'b0; bus_addr = '0; bus_wdata = '0;
    data_ready = 1'b0; data_out = '0; byte_out = '0; atr_error = 1'b0; protocol = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(!reset_button && !command_ready && data_in == 8'h00, "control clear after reset");
    last = '0;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      v = $urandom;
      bus_addr = 4'($urandom_range(0, 15));
      bus_wdata = v; bus_wr = 1'b1;
      @(negedge clk) bus_wr = 1'b0;
      if (bus_addr == 4'd9) last = v;
      check(reset_button == last[31], "reset_button bit");
      check(command_ready == last[30], "Command_ready bit");
      check(data_in == {last[29], last[28], last[27], last[26], last[25], last[24], last[23], last[22]},
            "data_in bits");
      data_ready = 1'($urandom); data_out = 8'($urandom); byte_out = 8'($urandom);
      atr_error = 1'($urandom); protocol = 4'($urandom);
      bus_addr = 4'd6; #1; check(bus_rdata == {31'd0, data_ready}, "reg 6");
      bus_addr = 4'd7; #1; check(bus_rdata == 32'(data_out), "reg 7");
      bus_addr = 4'd8; #1; check(bus_rdata == 32'(byte_out), "reg 8");
      bus_addr = 4'd9; #1; check(bus_rdata == last, "reg 9 readback");
      bus_addr = 4'd10; #1; check(bus_rdata == 32'(atr_error) + 32'(protocol) * 16, "reg 10");
      bus_addr = 4'($urandom_range(0, 5)); #1; check(bus_rdata == 0, "unused register");
    end
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(!reset_button && !command_ready && data_in == 8'h00, "reset clears control");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
