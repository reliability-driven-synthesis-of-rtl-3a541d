// tb_ref_pkg: reference values the testbenches compare against, written out
// by hand and independent of the RTL's functions.
//   * the nine-state example machine (digit sequencer with a seven-segment
//     output), in two forms: state numbers and distance-two state codes;
//   * the state codes of the worked nine-state assignment example.
package tb_ref_pkg;

  // Seven-segment patterns of digits 0..8, bit 0 = segment a.
  localparam logic [6:0] SEG [9] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                     7'h6D, 7'h7D, 7'h07, 7'h7F};

  // Codes of the nine states after the distance-two assignment.
  localparam logic [4:0] CODE9 [9] = '{5'b00000, 5'b11000, 5'b01100, 5'b10100,
                                       5'b00110, 5'b01010, 5'b10010, 5'b11110,
                                       5'b00011};

  function automatic int ref_next(int s, logic [1:0] in);
    case (in)
      2'b00:   return s;
      2'b01:   return (s == 8) ? 0 : s + 1;
      2'b10:   return (s == 0) ? 8 : s - 1;
      default: return 0;
    endcase
  endfunction

  function automatic logic [6:0] ref_out(int s, logic [1:0] in);
    return (in == 2'b11) ? 7'h00 : SEG[s];
  endfunction

  function automatic int zeros7(logic [6:0] v);
    int z;
    z = 0;
    for (int i = 0; i < 7; i++) if (!v[i]) z++;
    return z;
  endfunction

  // Index of a state code, or -1 if no state has it.
  function automatic int code_index(logic [4:0] c);
    for (int i = 0; i < 9; i++) if (CODE9[i] == c) return i;
    return -1;
  endfunction

endpackage
