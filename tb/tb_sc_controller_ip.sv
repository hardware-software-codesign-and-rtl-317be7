// tb_sc_controller_ip: end-to-end test of the smart card peripheral at its
// default parameters (50 MHz clock, divide by 14, 372 clocks per etu during
// the answer to reset).
// A behavioural card is attached to the card pins through an open-drain
// line. Software is emulated on the register port:
//   1. release reset, poll registers 6/7/8 and collect the 19-byte ATR,
//      checking each byte, its index, the data_ready width (1 etu = 372*14
//      clk, to within one card clock) and the character spacing (12 etu);
//   2. write a 6-byte command through register 9 (data_in, Command_ready);
//      check the card received it with good parity at the TA1 etu (32 card
//      clocks) and that the reader's start-to-parity drive lasts 10 etu;
//   3. read the card's 90 00 reply at the new etu (data_ready = 32*14 clk);
//   4. send the stored ROM command with the rom_write switch;
//   5. remove the card (card_enable low), re-insert an inverse-convention
//      card, read its ATR (TS reads 3F), write the command and read the
//      reply in that convention;
//   6. reset through register 9 and read an ATR with an unknown TS, which
//      must raise atr_error.
// Each mechanism is counted; one that never happens is a failure.
module tb_sc_controller_ip;

  localparam int CLK_DIV  = 14;
  localparam int ETU0_CLK = 372 * CLK_DIV;
  localparam int ETU1_CLK = 32 * CLK_DIV;     // TA1 = 95: F 512 / D 16

  logic        clk = 1'b0;
  logic        bus_rst;
  logic [3:0]  bus_addr;
  logic        bus_wr;
  logic [31:0] bus_wdata, bus_rdata;
  logic        card_enable, rom_write;
  logic        card_io_I, card_io_O, card_io_T, card_clk, card_rst, atr_error;
  logic        card_out, inverse_mode, bad_ts;

  int checks = 0, failures = 0;
  int n_atr_direct = 0, n_atr_inverse = 0, n_etu_switch = 0, n_host_write = 0;
  int n_rom_write = 0, n_fast_read = 0, n_deactivate = 0, n_reg_reset = 0;
  int n_atr_error = 0, n_inverse_write = 0;

  always #10 clk = ~clk;

  sc_controller_ip dut (.*);

  sc_card_model u_card (
    .card_clk, .card_rst, .line(card_io_I), .inverse_mode, .bad_ts,
    .io_out(card_out)
  );

  // open-drain line: reader drives when T = 0, card pulls low
  assign card_io_I = (card_io_T ? 1'b1 : card_io_O) & card_out;

  logic [7:0] exp_atr [19] = '{8'h3B, 8'hBE, 8'h95, 8'h00, 8'h00, 8'h41, 8'h03,
                               8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                               8'h00, 8'h00, 8'h02, 8'h90, 8'h00};
  logic [7:0] cmd  [6] = '{8'h00, 8'hA4, 8'h00, 8'h00, 8'h02, 8'h3F};
  logic [7:0] rom  [6] = '{8'h80, 8'hCA, 8'h00, 8'h00, 8'h00, 8'h00};

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic reg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge clk);
    bus_wr = 1'b0;
  endtask

  // Poll like the software: whenever data_ready is seen, read data_out and
  // byte_out once per character. Returns byte, index and data_ready width.
  task automatic read_char(output logic [7:0] d, output logic [7:0] idx,
                           output int width, output longint t_rise);
    int w;
    forever begin
      @(negedge clk);
      bus_addr = 4'd6;
      #1;
      if (bus_rdata[0]) break;
    end
    t_rise = longint'($time / 20);
    bus_addr = 4'd7; #1; d   = bus_rdata[7:0];
    bus_addr = 4'd8; #1; idx = bus_rdata[7:0];
    w = 1;
    forever begin
      @(negedge clk);
      bus_addr = 4'd6;
      #1;
      if (!bus_rdata[0]) break;
      w++;
    end
    width = w;
  endtask

  task automatic read_atr(input logic [7:0] ts, input bit timing);
    logic [7:0] d, idx;
    int         w;
    longint     t, t_prev;
    for (int i = 0; i < 19; i++) begin
      read_char(d, idx, w, t);
      check(d == (i == 0 ? ts : exp_atr[i]), $sformatf("ATR byte %0d = %02h", i, d));
      check(idx == 8'(i), $sformatf("ATR index %0d reads %0d", i, idx));
      if (timing) begin
        check(w > ETU0_CLK - CLK_DIV && w <= ETU0_CLK, $sformatf("data_ready width %0d", w));
        if (i > 0)
          check(t - t_prev == 12 * ETU0_CLK, $sformatf("char spacing %0d", t - t_prev));
      end
      t_prev = t;
    end
    repeat (5) @(negedge clk);
    bus_addr = 4'd8; #1;
    check(bus_rdata[7:0] == 8'd19, "byte counter reads 19 after the ATR");
  endtask

  // width in clk of the reader's drive window (card_io_T low)
  int drive_w [$];
  int t_low = 0, t_cnt = 0;
  always @(posedge clk) begin
    if (!card_io_T) t_cnt <= t_cnt + 1;
    else if (t_cnt != 0) begin
      drive_w.push_back(t_cnt);
      t_cnt <= 0;
    end
  end

  task automatic read_reply(input logic [7:0] idx0);
    logic [7:0] d, idx;
    int         w;
    longint     t;
    read_char(d, idx, w, t);
    check(d == 8'h90 && idx == idx0, $sformatf("reply SW1 %02h idx %0d", d, idx));
    check(w > ETU1_CLK - CLK_DIV && w <= ETU1_CLK, $sformatf("reply data_ready width %0d", w));
    read_char(d, idx, w, t);
    check(d == 8'h00 && idx == idx0 + 1, $sformatf("reply SW2 %02h idx %0d", d, idx));
    if (w > ETU1_CLK - CLK_DIV && w <= ETU1_CLK) n_fast_read++;
  endtask

  initial begin
    int base;
    bus_rst = 1'b1; bus_addr = '0; bus_wr = 1'b0; bus_wdata = '0;
    card_enable = 1'b1; rom_write = 1'b0; inverse_mode = 1'b0; bad_ts = 1'b0;
    repeat (10) @(negedge clk);
    bus_rst = 1'b0;
    reg_write(4'd9, 32'h0000_0000);

    // 1. ATR, direct convention, 372 clocks per etu
    read_atr(8'h3B, 1'b1);
    bus_addr = 4'd10; #1;
    check(bus_rdata[0] == 1'b0, "no ATR error");
    check(bus_rdata[7:4] == 4'd0, "protocol T=0 from TD1");
    n_atr_direct++;

    // 2. host command through register 9
    base = u_card.rx_count;
    drive_w.delete();
    for (int i = 0; i < 6; i++) begin
      reg_write(4'd9, {2'b01, cmd[i], 22'd0});
      reg_write(4'd9, {2'b00, cmd[i], 22'd0});
      repeat (13 * ETU1_CLK) @(negedge clk);
    end
    check(u_card.rx_count == base + 6, $sformatf("card got %0d bytes", u_card.rx_count - base));
    for (int i = 0; i < 6; i++)
      check(u_card.rx_log[(base + i) % 64] == cmd[i], $sformatf("command byte %0d", i));
    check(u_card.parity_err == 0, "command parity");
    check(drive_w.size() == 6, $sformatf("%0d drive windows", drive_w.size()));
    foreach (drive_w[i]) begin
      check(drive_w[i] >= 10 * ETU1_CLK - CLK_DIV && drive_w[i] <= 10 * ETU1_CLK + CLK_DIV,
            $sformatf("drive window %0d clk", drive_w[i]));
      if (drive_w[i] < 20 * ETU1_CLK) n_etu_switch++;
    end
    n_host_write++;
    read_reply(8'd19);

    // 3. stored command from the ROM switch
    base = u_card.rx_count;
    @(negedge clk) rom_write = 1'b1;
    read_reply(8'd21);
    rom_write = 1'b0;
    check(u_card.rx_count == base + 6, "card got the ROM command");
    for (int i = 0; i < 6; i++)
      check(u_card.rx_log[(base + i) % 64] == rom[i], $sformatf("ROM byte %0d", i));
    if (u_card.rx_count == base + 6) n_rom_write++;

    // 4. card removed, inverse-convention card inserted
    @(negedge clk) card_enable = 1'b0;
    repeat (20) @(negedge clk);
    check(card_rst == 1'b0 && card_clk == 1'b0 && card_io_T == 1'b1, "card deactivated");
    bus_addr = 4'd8; #1;
    check(bus_rdata[7:0] == 8'd0, "byte counter cleared on removal");
    n_deactivate++;
    inverse_mode = 1'b1;
    @(negedge clk) card_enable = 1'b1;
    read_atr(8'h3F, 1'b1);
    bus_addr = 4'd10; #1;
    check(bus_rdata[0] == 1'b0, "inverse ATR accepted");
    n_atr_inverse++;
    // command and reply in inverse convention
    base = u_card.rx_count;
    for (int i = 0; i < 6; i++) begin
      reg_write(4'd9, {2'b01, cmd[i], 22'd0});
      reg_write(4'd9, {2'b00, cmd[i], 22'd0});
      repeat (13 * ETU1_CLK) @(negedge clk);
    end
    for (int i = 0; i < 6; i++)
      check(u_card.rx_log[(base + i) % 64] == cmd[i], $sformatf("inverse command byte %0d", i));
    check(u_card.parity_err == 0, "inverse command parity");
    read_reply(8'd19);
    if (u_card.rx_count == base + 6 && u_card.parity_err == 0) n_inverse_write++;

    // 5. software reset, card with an unknown TS
    reg_write(4'd9, 32'h8000_0000);
    repeat (20) @(negedge clk);
    check(card_rst == 1'b0, "register reset holds card_rst low");
    n_reg_reset++;
    inverse_mode = 1'b0; bad_ts = 1'b1;
    reg_write(4'd9, 32'h0000_0000);
    read_atr(8'h55, 1'b0);
    bus_addr = 4'd10; #1;
    check(bus_rdata[0] == 1'b1, "unknown TS flagged");
    check(atr_error == 1'b1, "atr_error pin");
    if (atr_error) n_atr_error++;

    check(n_atr_direct > 0,  "mechanism: ATR read, direct convention");
    check(n_atr_inverse > 0, "mechanism: ATR read, inverse convention");
    check(n_etu_switch > 0,  "mechanism: etu switched to TA1");
    check(n_host_write > 0,  "mechanism: command written from registers");
    check(n_rom_write > 0,   "mechanism: command written from ROM");
    check(n_fast_read > 0,   "mechanism: reply read at TA1 etu");
    check(n_deactivate > 0,  "mechanism: card removal");
    check(n_reg_reset > 0,   "mechanism: software reset");
    check(n_atr_error > 0,   "mechanism: ATR error");
    check(n_inverse_write > 0, "mechanism: command written in inverse convention");
    $display("mechanisms: atr_direct=%0d atr_inverse=%0d etu_switch=%0d host_write=%0d rom_write=%0d fast_read=%0d deactivate=%0d reg_reset=%0d atr_error=%0d inverse_write=%0d",
             n_atr_direct, n_atr_inverse, n_etu_switch, n_host_write, n_rom_write,
             n_fast_read, n_deactivate, n_reg_reset, n_atr_error, n_inverse_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
