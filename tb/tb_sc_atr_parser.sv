// tb_sc_atr_parser: feeds whole answers to reset one character at a time
// and checks convention, end of ATR, error flag, protocol and the etu chosen
// from TA1 (F/D in card clocks, worked out here from the ISO 7816-3 tables):
//   the purse card's 19-byte ATR (TA1 95 -> 512/16 = 32, T=0);
//   the same in inverse convention;
//   a T=1 ATR with TD1, TA2, TB2, one historical byte and a correct TCK;
//   the same with a wrong TCK (error);
//   an unknown TS (error); TA1 = 13 (372/4 = 93); a reserved Fi (error);
//   a minimal ATR 3B 00 (done at once, etu stays 372).
module tb_sc_atr_parser;
  import sc_pkg::*;
  logic clk = 1'b0, rst, clear, byte_valid;
  logic [7:0] raw, data;
  logic inverse_now, inverse, atr_done, atr_error;
  logic [11:0] etu_len;
  logic [3:0] protocol;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_atr_parser dut (.*);
  sc_convention u_conv (.raw(raw), .inverse(inverse_now), .data(data));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // raw line bits for a byte
  function automatic logic [7:0] line_of(input logic [7:0] d, input logic inv);
    logic [7:0] r;
    r = {<<{d}};
    return inv ? ~r : d;
  endfunction

  task automatic feed(input logic [7:0] chars [], input logic inv,
                      input logic exp_err, input int exp_etu, input logic [3:0] exp_t,
                      input string name);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    foreach (chars[i]) begin
      raw = line_of(chars[i], inv);
      #1;
      check(data == chars[i], $sformatf("%s: char %0d decodes to %02h", name, i, data));
      check(!atr_done, $sformatf("%s: not done before char %0d", name, i));
      byte_valid = 1'b1;
      @(negedge clk) byte_valid = 1'b0;
      repeat (3) @(negedge clk);
    end
    check(atr_done, $sformatf("%s: done", name));
    check(inverse == inv, $sformatf("%s: convention", name));
    check(atr_error == exp_err, $sformatf("%s: error flag %0d", name, atr_error));
    if (!exp_err) begin
      check(etu_len == 12'(exp_etu), $sformatf("%s: etu %0d expected %0d", name, etu_len, exp_etu));
      check(protocol == exp_t, $sformatf("%s: protocol %0d", name, protocol));
    end
    // characters after the ATR change nothing
    raw = 8'h00; byte_valid = 1'b1;
    @(negedge clk) byte_valid = 1'b0;
    @(negedge clk);
    check(atr_error == exp_err && atr_done, $sformatf("%s: later chars ignored", name));
  endtask

  initial begin
    static logic [7:0] purse [] = '{8'h3B, 8'hBE, 8'h95, 8'h00, 8'h00, 8'h41, 8'h03,
                             8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                             8'h00, 8'h00, 8'h02, 8'h90, 8'h00};
    logic [7:0] purse_inv [];
    static logic [7:0] t1 [] = '{8'h3B, 8'h81, 8'h31, 8'h11, 8'h45, 8'hAA, 8'h00};
    logic [7:0] t1_bad [];
    static logic [7:0] bad_ts [] = '{8'h55, 8'h00};
    static logic [7:0] ta13 [] = '{8'h3B, 8'h10, 8'h13};
    static logic [7:0] rfu [] = '{8'h3B, 8'h10, 8'h71};
    static logic [7:0] tiny [] = '{8'h3B, 8'h00};
    rst = 1'b1; clear = 1'b0; byte_valid = 1'b0; raw = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // TCK = XOR of T0..last historical byte
    t1[6] = t1[1] ^ t1[2] ^ t1[3] ^ t1[4] ^ t1[5];
    t1_bad = t1;
    t1_bad[6] = ~t1[6];
    purse_inv = purse;
    purse_inv[0] = 8'h3F;
    feed(purse, 1'b0, 1'b0, 512 / 16, 4'd0, "purse");
    feed(purse_inv, 1'b1, 1'b0, 512 / 16, 4'd0, "purse inverse");
    feed(t1, 1'b0, 1'b0, 372, 4'd1, "T=1 with TCK");
    feed(t1_bad, 1'b0, 1'b1, 0, 4'd0, "bad TCK");
    feed(bad_ts, 1'b0, 1'b1, 0, 4'd0, "unknown TS");
    feed(ta13, 1'b0, 1'b0, 372 / 4, 4'd0, "TA1 13");
    feed(rfu, 1'b0, 1'b1, 0, 4'd0, "reserved Fi");
    feed(tiny, 1'b0, 1'b0, 372, 4'd0, "3B 00");
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
