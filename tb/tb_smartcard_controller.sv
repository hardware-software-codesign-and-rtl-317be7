// tb_smartcard_controller: the controller with a behavioural card, at a
// card clock of clk/4 and a 20-clock reset hold to keep the run short.
// Checks the 19-byte ATR on data_out/data_ready/byte_out with data_ready one
// etu (372 card clocks) wide, the card clock ratio, the reset hold, a 6-byte
// command written with Command_ready pulses (bytes, parity and a 10-etu drive
// window at the TA1 etu of 32 card clocks), the card's 90 00 reply at that
// etu, the ROM command sequence, and that a Command_ready held high is taken
// once.
module tb_smartcard_controller;
  localparam int CLK_DIV = 4;
  localparam int RST_LOW = 20;
  localparam int ETU0 = 372 * CLK_DIV;
  localparam int ETU1 = 32 * CLK_DIV;

  logic clk = 1'b0, reset_button, card_enable, Command_ready, rom_write;
  logic [7:0] data_in, data_out, byte_out;
  logic card_io_I, card_io_O, card_io_T, card_clk, card_rst, data_ready, atr_error;
  logic [3:0] protocol;
  logic card_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  smartcard_controller #(.CLK_DIV(CLK_DIV), .RST_LOW_CLKS(RST_LOW)) dut (.*);
  sc_card_model #(.RST_DELAY(50)) u_card (
    .card_clk, .card_rst, .line(card_io_I), .inverse_mode(1'b0), .bad_ts(1'b0),
    .io_out(card_out)
  );
  assign card_io_I = (card_io_T ? 1'b1 : card_io_O) & card_out;

  logic [7:0] exp_atr [19] = '{8'h3B, 8'hBE, 8'h95, 8'h00, 8'h00, 8'h41, 8'h03,
                               8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                               8'h00, 8'h00, 8'h02, 8'h90, 8'h00};
  logic [7:0] cmd [6] = '{8'h00, 8'hB0, 8'h00, 8'h00, 8'h08, 8'h5A};
  logic [7:0] rom [6] = '{8'h80, 8'hCA, 8'h00, 8'h00, 8'h00, 8'h00};

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic get_char(output logic [7:0] d, output logic [7:0] idx, output int w);
    while (!data_ready) @(negedge clk);
    d = data_out; idx = byte_out; w = 0;
    while (data_ready) begin
      if (data_out != d) failures++;
      @(negedge clk); w++;
    end
  endtask

  // reader drive windows
  int drive_w [$];
  int t_cnt = 0;
  always @(posedge clk) begin
    if (!card_io_T) t_cnt <= t_cnt + 1;
    else if (t_cnt != 0) begin drive_w.push_back(t_cnt); t_cnt <= 0; end
  end

  // card clock ratio
  int cc_edges = 0, clk_cnt = 0;
  always @(posedge card_clk) cc_edges++;
  always @(posedge clk) clk_cnt++;

  task automatic reply(input logic [7:0] idx0);
    logic [7:0] d, idx;
    int w;
    get_char(d, idx, w);
    check(d == 8'h90 && idx == idx0, $sformatf("SW1 %02h idx %0d", d, idx));
    check(w > ETU1 - CLK_DIV && w <= ETU1, $sformatf("SW1 data_ready %0d clk", w));
    get_char(d, idx, w);
    check(d == 8'h00 && idx == idx0 + 1, $sformatf("SW2 %02h idx %0d", d, idx));
  endtask

  initial begin
    logic [7:0] d, idx;
    int w, t, base, e0, c0;
    reset_button = 1'b1; card_enable = 1'b1; Command_ready = 1'b0; rom_write = 1'b0;
    data_in = '0;
    repeat (5) @(negedge clk);
    reset_button = 1'b0;
    t = 0;
    while (!card_rst) begin @(negedge clk); t++; end
    check(t >= (RST_LOW - 1) * CLK_DIV && t <= RST_LOW * CLK_DIV + 2 * CLK_DIV,
          $sformatf("card_rst low %0d clk", t));
    e0 = cc_edges; c0 = clk_cnt;
    for (int i = 0; i < 19; i++) begin
      get_char(d, idx, w);
      check(d == exp_atr[i] && idx == 8'(i), $sformatf("ATR %0d: %02h idx %0d", i, d, idx));
      check(w > ETU0 - CLK_DIV && w <= ETU0, $sformatf("data_ready %0d clk", w));
    end
    check((clk_cnt - c0) / (cc_edges - e0) == CLK_DIV, "card clock ratio");
    @(negedge clk);
    check(byte_out == 8'd19, "19 characters counted");
    check(!atr_error && protocol == 4'd0, "ATR accepted, T=0");

    // command from data_in / Command_ready
    base = u_card.rx_count;
    drive_w.delete();
    for (int i = 0; i < 6; i++) begin
      data_in = cmd[i];
      Command_ready = 1'b1;
      @(negedge clk);
      if (i == 5) repeat (100) @(negedge clk);   // held high: still one byte
      Command_ready = 1'b0;
      data_in = 8'hEE;
      while (u_card.rx_count == base + i) @(negedge clk);
      repeat (2 * ETU1) @(negedge clk);
    end
    check(u_card.rx_count == base + 6, "six bytes written");
    for (int i = 0; i < 6; i++)
      check(u_card.rx_log[(base + i) % 64] == cmd[i], $sformatf("command byte %0d", i));
    check(u_card.parity_err == 0, "parity of written bytes");
    check(drive_w.size() == 6, $sformatf("%0d drive windows", drive_w.size()));
    foreach (drive_w[i])
      check(drive_w[i] > 10 * ETU1 - CLK_DIV && drive_w[i] <= 10 * ETU1 + CLK_DIV,
            $sformatf("drive window %0d clk", drive_w[i]));
    reply(8'd19);

    // ROM sequence
    base = u_card.rx_count;
    @(negedge clk) rom_write = 1'b1;
    reply(8'd21);
    rom_write = 1'b0;
    check(u_card.rx_count == base + 6, "ROM bytes written");
    for (int i = 0; i < 6; i++)
      check(u_card.rx_log[(base + i) % 64] == rom[i], $sformatf("ROM byte %0d", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
