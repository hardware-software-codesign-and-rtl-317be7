// tb_sc_byte_counter: random increment pulses, compared with a reference
// count (including the wrap at 256), then reset.
module tb_sc_byte_counter;
  logic clk = 1'b0, rst, inc;
  logic [7:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_byte_counter dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ref_cnt;
    rst = 1'b1; inc = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ref_cnt = 0;
    for (int i = 0; i < 1000; i++) begin
      inc = 1'($urandom_range(0, 1));
      @(negedge clk);
      if (inc) ref_cnt++;
      check(count == 8'(ref_cnt), $sformatf("count %0d expected %0d", count, ref_cnt % 256));
    end
    check(ref_cnt > 256, "wrapped at least once");
    rst = 1'b1;
    @(negedge clk);
    check(count == 8'd0, "reset");
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
