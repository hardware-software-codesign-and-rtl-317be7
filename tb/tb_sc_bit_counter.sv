// tb_sc_bit_counter: counts random end-of-etu pulses through three 12-etu
// frames and checks the index against a reference count modulo 12, the last
// flag on index 11, and the clear.
module tb_sc_bit_counter;
  logic clk = 1'b0, rst, clear, etu_done, last;
  logic [3:0] bit_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_bit_counter dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ref_cnt;
    rst = 1'b1; clear = 1'b0; etu_done = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ref_cnt = 0;
    for (int i = 0; i < 300; i++) begin
      etu_done = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (etu_done) ref_cnt = (ref_cnt + 1) % 12;
      @(negedge clk);
      check(bit_cnt == 4'(ref_cnt), $sformatf("bit_cnt %0d expected %0d", bit_cnt, ref_cnt));
      check(last == (ref_cnt == 11), "last flag");
    end
    etu_done = 1'b0;
    clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(bit_cnt == 4'd0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
