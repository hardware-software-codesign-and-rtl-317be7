// tb_sc_fsm: the state machine with the etu and bit counters around it,
// ticks every clk and an 8-tick etu. Checks: the reset hold in IDLE
// (RST_LOW_CLKS ticks, card_rst low), the wait state, a received frame
// (9 samples in the middle of etu 1..9, capture after 11 etu, no drive), a
// written frame (drive for exactly 10 etu, acknowledge after 12 etu, shift
// at every etu end), the priority of reading over a pending write, and the
// return to IDLE when the card is removed.
module tb_sc_fsm;
  import sc_pkg::*;
  localparam int ETU = 8;
  localparam int RST_LOW = 5;
  logic clk = 1'b0, rst, card_enable, line_in, cmd_pending, tick;
  logic etu_mid, etu_done, card_rst, cnt_clear, baud_run, sample, tx_load;
  logic tx_shift, drive, capture, cmd_ack;
  logic [3:0] bit_cnt;
  logic [11:0] etu_count;
  sc_state_e state;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  assign tick = 1'b1;

  sc_fsm #(.RST_LOW_CLKS(RST_LOW)) dut (.*);
  sc_baud_counter u_baud (.clk, .rst, .tick, .clear(cnt_clear), .run(baud_run),
                          .etu_len(12'(ETU)), .count(etu_count), .mid(etu_mid),
                          .done(etu_done));
  sc_bit_counter u_bits (.clk, .rst, .clear(cnt_clear), .etu_done, .bit_cnt, .last());

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t, samples, drives, shifts, t_cap, t_ack;
    int sample_at [$];
    rst = 1'b1; card_enable = 1'b1; line_in = 1'b1; cmd_pending = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // reset hold
    t = 0;
    while (!card_rst) begin
      check(state == ST_IDLE, "IDLE while card_rst is low");
      @(negedge clk); t++;
      if (t > 50) break;
    end
    check(t == RST_LOW, $sformatf("card_rst low for %0d ticks", t));
    check(state == ST_WAIT_FOR_DATA, "waiting for data");
    repeat (5) @(negedge clk);
    check(state == ST_WAIT_FOR_DATA && !drive, "still waiting, line released");

    // receive: start bit, then the FSM samples on its own
    line_in = 1'b0;
    @(negedge clk);
    check(state == ST_READ_DATA, "ReadData on start bit");
    line_in = 1'b1;
    cmd_pending = 1'b1;          // a write request arrives meanwhile
    t = 1; samples = 0; t_cap = -1;
    while (t < 14 * ETU && t_cap < 0) begin
      if (sample) begin samples++; sample_at.push_back(t); end
      check(!drive, "no drive while reading");
      if (capture) t_cap = t;
      @(negedge clk); t++;
    end
    check(samples == 9, $sformatf("%0d samples", samples));
    foreach (sample_at[i])
      check(sample_at[i] == (i + 1) * ETU + ETU / 2, $sformatf("sample %0d at %0d", i, sample_at[i]));
    check(t_cap == 11 * ETU + 1, $sformatf("capture at %0d", t_cap));

    // the pending write starts next
    while (state == ST_PROCESS_DATA) @(negedge clk);
    check(state == ST_WAIT_FOR_DATA, "back to wait");
    check(tx_load == 1'b1, "write loaded from wait");
    @(negedge clk);
    cmd_pending = 1'b0;
    check(state == ST_WRITE_COMMAND, "WriteCommand");
    t = 0; drives = 0; shifts = 0; t_ack = -1;
    while (t < 14 * ETU && t_ack < 0) begin
      if (drive) drives++;
      if (tx_shift) shifts++;
      if (cmd_ack) t_ack = t;
      @(negedge clk); t++;
    end
    check(drives == 10 * ETU, $sformatf("drove %0d ticks", drives));
    check(shifts == 12, $sformatf("%0d shifts", shifts));
    check(t_ack == 12 * ETU, $sformatf("ack at %0d", t_ack));

    // card removal
    @(negedge clk) card_enable = 1'b0;
    @(negedge clk);
    check(state == ST_IDLE && !card_rst, "IDLE on removal");
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
