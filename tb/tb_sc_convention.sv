// tb_sc_convention: all 256 line patterns in both conventions. Direct must
// give the pattern unchanged; inverse must give the byte read MSB first with
// low = 1 (computed here with a streaming reversal). Includes the TS check:
// line 3B is 3B direct, line 03 is 3F inverse.
module tb_sc_convention;
  logic [7:0] raw, data;
  logic       inverse;
  int checks = 0, failures = 0;

  sc_convention dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] expv;
    for (int i = 0; i < 256; i++) begin
      raw = 8'(i);
      inverse = 1'b0; #1;
      check(data == raw, $sformatf("direct %02h -> %02h", raw, data));
      inverse = 1'b1; #1;
      expv = {<<{raw}};
      expv = ~expv;
      check(data == expv, $sformatf("inverse %02h -> %02h", raw, data));
    end
    raw = 8'h3B; inverse = 1'b0; #1; check(data == 8'h3B, "TS direct");
    raw = 8'h03; inverse = 1'b1; #1; check(data == 8'h3F, "TS inverse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
