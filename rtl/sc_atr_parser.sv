// sc_atr_parser: communication mode selection from the answer to reset.
// Follows the ATR character by character as the controller hands them over
// (byte_valid, one clk per character, with the raw line bits and the decoded
// byte):
//   TS  - raw 3B selects direct convention, raw 03 (TS = 3F read in inverse
//         convention) selects inverse convention; anything else is an error.
//         inverse_now gives the convention to decode the TS character itself.
//   T0  - high nibble Y1 says which of TA1, TB1, TC1, TD1 follow, low nibble
//         K the number of historical characters.
//   TAi/TBi/TCi/TDi - taken in that order as Yi announces them; TA1 gives
//         Fi/Di, TDi gives the next Yi+1 and a protocol T (TD1 sets protocol).
//   T1..TK historical characters, then TCK if any TDi named a protocol other
//         than T=0; the XOR of T0..TCK must be 0.
// When the last character is in, atr_done rises and etu_len switches from 372
// to F/D of TA1 (kept at 372 if TA1 was absent). An unknown TS, a reserved
// Fi/Di code, a bad TCK or more than MAX_CHARS characters set atr_error.
// Characters after the ATR are ignored. clear (card deactivated) restarts.
// F/D is rounded down to whole card clocks. Selecting the convention from
// TS, the etu from TA1 and an error output follow the reader description;
// the protocol is taken from TD1, and the error rules are this design's.
module sc_atr_parser
  import sc_pkg::*;
#(
  parameter int unsigned MAX_CHARS = 33
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             byte_valid,
  input  logic [7:0]       raw,
  input  logic [7:0]       data,
  output logic             inverse_now,
  output logic             inverse,
  output logic             atr_done,
  output logic             atr_error,
  output logic [ETU_W-1:0] etu_len,
  output logic [3:0]       protocol
);

  typedef enum logic [2:0] {P_TS, P_T0, P_IFACE, P_HIST, P_TCK, P_DONE} phase_e;

  phase_e      phase;
  logic [3:0]  y;          // interface characters still expected for this i
  logic [3:0]  k;          // historical characters still expected
  logic        first_set;  // still in the i = 1 group
  logic        need_tck;
  logic [7:0]  chk;        // running XOR from T0
  logic [5:0]  count;      // characters received
  logic [3:0]  fi, di;
  logic        ta1_seen;

  // next phase after the interface characters of the current group run out
  function automatic phase_e after_iface(input logic [3:0] kk, input logic tck);
    if (kk != 0) return P_HIST;
    if (tck)     return P_TCK;
    return P_DONE;
  endfunction

  // lowest announced interface character: 0 TA, 1 TB, 2 TC, 3 TD
  logic [1:0] which;
  always_comb begin
    which = 2'd3;
    for (int b = 3; b >= 0; b--)
      if (y[b]) which = 2'(b);
  end

  assign inverse_now = (phase == P_TS) ? (raw == TS_INVERSE_RAW) : inverse;

  logic [11:0] f_val;
  logic [6:0]  d_val;
  assign f_val = fi_to_f(fi);
  assign d_val = di_to_d(di);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      phase     <= P_TS;
      y         <= '0;
      k         <= '0;
      first_set <= 1'b1;
      need_tck  <= 1'b0;
      chk       <= '0;
      count     <= '0;
      fi        <= 4'd1;
      di        <= 4'd1;
      ta1_seen  <= 1'b0;
      inverse   <= 1'b0;
      atr_done  <= 1'b0;
      atr_error <= 1'b0;
      etu_len   <= ETU_W'(F_DEFAULT);
      protocol  <= '0;
    end else if (byte_valid && phase != P_DONE) begin
      count <= count + 1'b1;
      if (count == 6'(MAX_CHARS)) begin
        // a character beyond the longest legal ATR
        atr_error <= 1'b1;
        phase     <= P_DONE;
        atr_done  <= 1'b1;
      end else begin
        if (phase != P_TS) chk <= chk ^ data;
        unique case (phase)
          P_TS: begin
            if (raw == TS_DIRECT_RAW)       inverse <= 1'b0;
            else if (raw == TS_INVERSE_RAW) inverse <= 1'b1;
            else                            atr_error <= 1'b1;
            phase <= P_T0;
          end
          P_T0: begin
            y <= data[7:4];
            k <= data[3:0];
            if (data[7:4] != 0)      phase <= P_IFACE;
            else if (data[3:0] != 0) phase <= P_HIST;
            else                     phase <= P_DONE;
          end
          P_IFACE: begin
            logic [3:0] y_left;
            y_left = y & ~(4'b0001 << which);
            if (which == 2'd0 && first_set) begin
              fi       <= data[7:4];
              di       <= data[3:0];
              ta1_seen <= 1'b1;
            end
            if (which == 2'd3) begin
              // TDi: announces the next group and a protocol
              if (first_set) protocol <= data[3:0];
              if (data[3:0] != 0) need_tck <= 1'b1;
              first_set <= 1'b0;
              y <= data[7:4];
              if (data[7:4] == 0)
                phase <= after_iface(k, need_tck || (data[3:0] != 0));
            end else begin
              y <= y_left;
              if (y_left == 0) phase <= after_iface(k, need_tck);
            end
          end
          P_HIST: begin
            k <= k - 1'b1;
            if (k == 4'd1) phase <= need_tck ? P_TCK : P_DONE;
          end
          P_TCK: begin
            if ((chk ^ data) != 8'h00) atr_error <= 1'b1;
            phase <= P_DONE;
          end
          default: ;
        endcase
      end
    end else if (phase == P_DONE && !atr_done) begin
      // ATR complete: switch to the negotiated etu
      atr_done <= 1'b1;
      if (ta1_seen) begin
        if (f_val == 0 || d_val == 0) atr_error <= 1'b1;
        else etu_len <= ETU_W'(f_val / ETU_W'(d_val));
      end
    end
  end

endmodule
