// tb_sc_cmd_rom: a rising start edge must produce the stored bytes in order,
// one request per write-complete acknowledge (acknowledged here after a
// random delay), then busy must fall and requests stop; holding start high
// does not repeat the sequence, a new rising edge does.
module tb_sc_cmd_rom;
  logic clk = 1'b0, rst, start, done, req, busy;
  logic [7:0] byte_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_cmd_rom dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] expv [6] = '{8'h80, 8'hCA, 8'h00, 8'h00, 8'h00, 8'h00};

  task automatic sequence_run();
    int got;
    got = 0;
    @(negedge clk) start = 1'b1;
    for (int guard = 0; guard < 2000 && (busy || got == 0); guard++) begin
      @(negedge clk);
      if (req) begin
        check(got < 6 && byte_o == expv[got], $sformatf("byte %0d = %02h", got, byte_o));
        got++;
        repeat ($urandom_range(2, 20)) begin
          @(negedge clk);
          check(!req, "one request per byte");
        end
        done = 1'b1;
        @(negedge clk) done = 1'b0;
      end
    end
    check(got == 6, $sformatf("%0d bytes", got));
    check(!busy, "idle afterwards");
    repeat (50) begin
      @(negedge clk);
      check(!req, "no request while start stays high");
    end
    start = 1'b0;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; done = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    sequence_run();
    repeat (5) @(negedge clk);
    sequence_run();
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
