// tb_sc_shift_register: transmit - load random bytes in both conventions
// and shift out the 10 frame bits (start low, 8 line bits, parity such that
// logical ones are even) then idle high; receive - sample 9 random line bits
// and read them back as data and parity in arrival order.
module tb_sc_shift_register;
  logic clk = 1'b0, rst, load, inverse, sample, line_in, shift;
  logic [7:0] tx_raw, rx_data;
  logic rx_parity, tx_bit;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_shift_register dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [9:0] exp_bits;
    logic [8:0] rx_bits;
    int highs;
    rst = 1'b1; load = 1'b0; sample = 1'b0; shift = 1'b0; line_in = 1'b1;
    inverse = 1'b0; tx_raw = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(tx_bit == 1'b1, "idle high after reset");
    for (int n = 0; n < 40; n++) begin
      inverse = 1'(n % 2);
      tx_raw  = 8'($urandom);
      highs = 0;
      for (int i = 0; i < 8; i++) highs += int'(tx_raw[i]);
      // logical ones = highs (direct) or 8 - highs (inverse), plus parity
      exp_bits[0]   = 1'b0;
      exp_bits[8:1] = tx_raw;
      if (!inverse) exp_bits[9] = 1'((highs % 2) == 1);      // high = 1
      else          exp_bits[9] = 1'(((8 - highs) % 2) == 0); // low = 1
      load = 1'b1;
      @(negedge clk) load = 1'b0;
      for (int b = 0; b < 10; b++) begin
        check(tx_bit == exp_bits[b], $sformatf("tx bit %0d of %02h inv %0d", b, tx_raw, inverse));
        shift = 1'b1;
        @(negedge clk) shift = 1'b0;
        repeat (2) @(negedge clk);
      end
      check(tx_bit == 1'b1, "line released after the frame");
      rx_bits = 9'($urandom);
      for (int b = 0; b < 9; b++) begin
        line_in = rx_bits[b];
        sample = 1'b1;
        @(negedge clk) sample = 1'b0;
        @(negedge clk);
      end
      check(rx_data == rx_bits[7:0], $sformatf("rx data %02h expected %02h", rx_data, rx_bits[7:0]));
      check(rx_parity == rx_bits[8], "rx parity");
    end
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
