// state_assign_pkg: minimum-distance-two state assignment.
//
// A single fault in one next-state cone or one flip-flop flips at most one
// state bit. If every pair of state codes is at least Hamming distance two
// apart, such a flip always lands on a code that no state uses, and the state
// parity checker sees it. The assignment below is computed at elaboration
// time by constant functions and follows the procedure of the method:
//
//   * the first state gets the code 0 and a binary counter starts at 0;
//   * for each further state the counter is incremented until its value is at
//     distance two or more from every code already given out, and that value
//     becomes the state's code;
//   * when the counter runs out of values for the current width, the width
//     grows by one, a 0 is appended (as the new least significant bit) to
//     every code already given out, and the counter restarts so that the
//     first candidate is 0...01.
//
// For nine states this gives 00000, 11000, 01100, 10100, 00110, 01010,
// 10010, 11110, 00011. Every code produced has an even number of ones, so an
// even-parity checker on the state register detects any single-bit error.
// Codes are at most MAX_W bits wide and at most MAX_S states are handled.
package state_assign_pkg;

  localparam int unsigned MAX_W = 16;
  localparam int unsigned MAX_S = 64;

  typedef logic [MAX_W-1:0] code_t;

  typedef logic [MAX_S*MAX_W-1:0] code_table_t;   // code of state i at [i*MAX_W +: MAX_W]

  typedef struct packed {
    int unsigned width;
    code_table_t codes;
  } assignment_t;

  // Runs the assignment for n states (n <= MAX_S). Returns the code width
  // and the codes of all states, right-aligned, MAX_W bits per state.
  function automatic assignment_t run_assignment(int unsigned n);
    assignment_t r;
    int unsigned cnt;
    int unsigned given;
    logic        ok;
    r.codes = '0;
    r.width = 1;
    cnt     = 0;
    given   = 1;                     // state 0 holds code 0
    while (given < n) begin
      cnt++;
      if (cnt >= (1 << r.width)) begin
        r.width++;
        for (int i = 0; i < MAX_S; i++)
          if (i < given) r.codes[i*MAX_W +: MAX_W] = r.codes[i*MAX_W +: MAX_W] << 1;
        cnt = 1;
      end
      ok = 1'b1;
      for (int i = 0; i < MAX_S; i++)
        if (i < given && $countones(code_t'(cnt) ^ r.codes[i*MAX_W +: MAX_W]) < 2) ok = 1'b0;
      if (ok) begin
        r.codes[given*MAX_W +: MAX_W] = code_t'(cnt);
        given++;
      end
    end
    return r;
  endfunction

  // Codes of all n states, packed MAX_W bits per state.
  function automatic code_table_t all_codes(int unsigned n);
    return run_assignment(n).codes;
  endfunction

  // Width of the state register for n states.
  function automatic int unsigned code_width(int unsigned n);
    return run_assignment(n).width;
  endfunction

  // Code of state idx (0-based, in the order the states are listed) when the
  // machine has n states.
  function automatic code_t state_code(int unsigned n, int unsigned idx);
    code_table_t tab;
    tab = all_codes(n);
    return tab[(idx % MAX_S)*MAX_W +: MAX_W];
  endfunction

endpackage
