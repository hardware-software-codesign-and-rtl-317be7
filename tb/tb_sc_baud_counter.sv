// tb_sc_baud_counter: checks the etu timer with ticks every third clk, for
// the ATR etu of 372 card clocks and for the 32-clock etu of TA1 = 95: mid
// must come on the 186th (16th) tick after clear, done on the 372nd (32nd)
// and every etu after that, and nothing may happen while run is low.
module tb_sc_baud_counter;
  logic clk = 1'b0, rst, tick, clear, run, mid, done;
  logic [11:0] etu_len, count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_baud_counter dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_etus(input int len, input int etus);
    int t;
    etu_len = 12'(len);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    t = 0;
    for (int i = 0; i < 3 * len * etus; i++) begin
      tick = (i % 3 == 2);
      run  = 1'b1;
      #1;
      if (tick) t++;
      check(mid  == (tick && (t % len) == len / 2), $sformatf("mid at tick %0d len %0d", t, len));
      check(done == (tick && (t % len) == 0), $sformatf("done at tick %0d len %0d", t, len));
      @(negedge clk);
    end
    tick = 1'b0;
  endtask

  initial begin
    rst = 1'b1; tick = 1'b0; clear = 1'b0; run = 1'b0; etu_len = 12'd372;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_etus(372, 3);
    run_etus(32, 5);
    // run low: no pulses
    run = 1'b0;
    for (int i = 0; i < 200; i++) begin
      tick = 1'b1; #1;
      check(!mid && !done, "quiet while stopped");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
