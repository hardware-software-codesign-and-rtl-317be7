// sc_pkg: types and constants shared by the smart card reader blocks.
// Holds the controller state encoding, the ISO 7816-3 character and
// answer-to-reset constants, and the Fi/Di lookup that turns the TA1 byte of
// the answer to reset into a clock rate conversion integer F and a baud rate
// adjustment integer D (1 etu = F/D card clocks). The five state names follow
// the reader's state diagram; the numeric encoding is this design's choice.
package sc_pkg;

  typedef enum logic [2:0] {
    ST_IDLE          = 3'd0,
    ST_WAIT_FOR_DATA = 3'd1,
    ST_WRITE_COMMAND = 3'd2,
    ST_READ_DATA     = 3'd3,
    ST_PROCESS_DATA  = 3'd4
  } sc_state_e;

  // Width of etu lengths counted in card clocks (F reaches 2048).
  localparam int unsigned ETU_W = 12;

  // Default etu during the answer to reset: F = 372, D = 1.
  localparam int unsigned F_DEFAULT = 372;

  // One character occupies 12 etu: start, 8 data, parity, 2 guard.
  localparam int unsigned FRAME_ETU = 12;

  // Longest legal answer to reset, in characters.
  localparam int unsigned ATR_MAX = 33;

  // TS as it appears on the line when decoded LSB-first with high = 1.
  localparam logic [7:0] TS_DIRECT_RAW  = 8'h3B;
  localparam logic [7:0] TS_INVERSE_RAW = 8'h03;

  // Clock rate conversion integer from the high nibble of TA1; 0 = RFU.
  function automatic logic [11:0] fi_to_f(input logic [3:0] fi);
    case (fi)
      4'd0, 4'd1: return 12'd372;
      4'd2:       return 12'd558;
      4'd3:       return 12'd744;
      4'd4:       return 12'd1116;
      4'd5:       return 12'd1488;
      4'd6:       return 12'd1860;
      4'd9:       return 12'd512;
      4'd10:      return 12'd768;
      4'd11:      return 12'd1024;
      4'd12:      return 12'd1536;
      4'd13:      return 12'd2048;
      default:    return 12'd0;
    endcase
  endfunction

  // Baud rate adjustment integer from the low nibble of TA1; 0 = RFU.
  function automatic logic [6:0] di_to_d(input logic [3:0] di);
    case (di)
      4'd1:    return 7'd1;
      4'd2:    return 7'd2;
      4'd3:    return 7'd4;
      4'd4:    return 7'd8;
      4'd5:    return 7'd16;
      4'd6:    return 7'd32;
      4'd7:    return 7'd64;
      4'd8:    return 7'd12;
      4'd9:    return 7'd20;
      default: return 7'd0;
    endcase
  endfunction

endpackage
