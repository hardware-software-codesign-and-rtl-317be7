// sc_clock_divider: makes the smart card clock from the board clock.
// A counter runs 0..DIV-1 on clk; card_clk is high for the first DIV/2 counts
// and low for the rest, so a 50 MHz clock divided by the default 14 gives the
// 3.57 MHz card clock the reader was built for. tick is a one-clk pulse in the
// last count of each period, i.e. one pulse per card clock, used by the etu
// counters as a clock enable so that the whole reader stays in the clk
// domain. While en is low (no card present) or in reset the counter waits
// at its last count with card_clk low, so the first card clock edge comes one
// clk after the enable and every period, the first included, is DIV clk.
// The divide ratio follows the reader description; the duty cycle and the
// enable are this design's choices.
module sc_clock_divider #(
  parameter int unsigned DIV = 14
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic card_clk,
  output logic tick
);

  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt      <= CW'(DIV - 1);
      card_clk <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      // card_clk registered: high during counts 0..DIV/2-1
      card_clk <= (cnt == CW'(DIV - 1)) || (cnt < CW'(DIV / 2 - 1));
    end
  end

  assign tick = en && !rst && (cnt == CW'(DIV - 1));

endmodule
