// tb_sc_byte_encoder: with a tick every 4th clk and an etu of 10 ticks,
// each captured byte must appear on data_out with data_ready for exactly 10
// ticks (40 clk, give or take the tick phase), data_out must read 00
// afterwards, and released must pulse once as data_ready falls.
module tb_sc_byte_encoder;
  logic clk = 1'b0, rst, tick, capture, data_ready, released;
  logic [11:0] etu_len;
  logic [7:0] data_in, data_out;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign tick = (cyc % 4 == 3);

  sc_byte_encoder dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int w, rel;
    logic [7:0] b;
    rst = 1'b1; capture = 1'b0; data_in = '0; etu_len = 12'd10;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(1, 7)) @(negedge clk);
      b = 8'($urandom);
      data_in = b; capture = 1'b1;
      @(negedge clk);
      capture = 1'b0; data_in = 8'hFF;
      w = 1; rel = 0;
      while (data_ready) begin
        check(data_out == b, $sformatf("data_out %02h expected %02h", data_out, b));
        if (released) rel++;
        @(negedge clk);
        w++;
      end
      if (released) rel++;
      check(w > 36 && w <= 41, $sformatf("data_ready lasted %0d clk", w));
      check(data_out == 8'h00, "data_out cleared");
      check(rel == 1, $sformatf("%0d release pulses", rel));
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
