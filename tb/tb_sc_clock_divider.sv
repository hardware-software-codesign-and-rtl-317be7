// tb_sc_clock_divider: checks the card clock divider at its default ratio
// of 14: card_clk period and high time in clk cycles, one tick per period
// placed on the clk edge where card_clk rises, and a stopped, low clock while
// the enable is off. The first period after reset must be whole too.
module tb_sc_clock_divider;
  localparam int DIV = 14;
  logic clk = 1'b0, rst, en, card_clk, tick;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_clock_divider dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int last_rise, high, ticks, n, rises;
    logic prev;
    rst = 1'b1; en = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    last_rise = -1; high = 0; ticks = 0; n = 0; rises = 0; prev = card_clk;
    for (int c = 0; c < 20 * DIV; c++) begin
      @(posedge clk); #1;
      if (tick) ticks++;
      if (card_clk && !prev) begin
        rises++;
        if (rises > 1) begin
          check(c - last_rise == DIV, $sformatf("period %0d", c - last_rise));
          check(high == DIV / 2, $sformatf("high time %0d", high));
          check(ticks == 1, $sformatf("%0d ticks in a period", ticks));
          n++;
        end
        last_rise = c; high = 0; ticks = 0;
      end
      if (card_clk) high++;
      prev = card_clk;
    end
    check(n >= 18, "enough card clock periods");
    // tick sits on the clk cycle before card_clk rises
    for (int c = 0; c < 3 * DIV; c++) begin
      @(negedge clk);
      if (tick) begin
        @(posedge clk); #1;
        check(card_clk == 1'b1, "tick precedes rising card_clk");
      end
    end
    en = 1'b0;
    repeat (2) @(posedge clk);
    for (int c = 0; c < 3 * DIV; c++) begin
      @(posedge clk); #1;
      check(!card_clk && !tick, "stopped while disabled");
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
