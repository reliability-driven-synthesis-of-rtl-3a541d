// fsm_spec_pkg: the state transition graph that the fault-secure machines
// implement by default.
//
// The synthesis method takes any Mealy machine (inputs I, outputs O, states S,
// next-state function delta, output function omega) and builds checked
// hardware for it. Every machine module takes the machine as parameters:
// the three sizes and two tables, NS_TABLE (next state number) and OUT_TABLE
// (output vector), each with one entry per (state s, input value x) pair at
// entry index s * 2^NUM_INPUTS + x. This package supplies the defaults of
// those parameters.
//
// The default machine is an example chosen for this design, not one of the
// published benchmarks: a nine-state digit sequencer with two inputs and
// seven outputs. Nine states match the worked state-assignment example and
// seven outputs match the seven-bit Berger generator example, so every
// checker is exercised at those sizes.
//   in = 00 : hold the current digit
//   in = 01 : step to the next digit (8 wraps to 0)
//   in = 10 : step to the previous digit (0 wraps to 8)
//   in = 11 : return to digit 0
// The outputs drive a seven-segment display (bit 0 = segment a ... bit 6 =
// segment g) showing the current digit; while in = 11 the display is blank.
// State 0 (digit 0) is the reset state.
package fsm_spec_pkg;

  localparam int unsigned NUM_INPUTS  = 2;
  localparam int unsigned NUM_OUTPUTS = 7;
  localparam int unsigned NUM_STATES  = 9;

  localparam int unsigned NX     = 1 << NUM_INPUTS;
  localparam int unsigned SIDX_W = (NUM_STATES < 2) ? 1 : $clog2(NUM_STATES);

  typedef logic [NUM_INPUTS-1:0]  in_t;
  typedef logic [NUM_OUTPUTS-1:0] out_t;
  typedef logic [SIDX_W-1:0]      sidx_t;   // state number, 0 .. NUM_STATES-1

  typedef logic [NUM_STATES*NX*SIDX_W-1:0]      ns_table_t;
  typedef logic [NUM_STATES*NX*NUM_OUTPUTS-1:0] out_table_t;

  // Next-state function delta: state number and input to next state number.
  function automatic sidx_t delta(int unsigned s, int unsigned x);
    unique case (x)
      0:       return sidx_t'(s);
      1:       return sidx_t'((s + 1) % NUM_STATES);
      2:       return sidx_t'((s + NUM_STATES - 1) % NUM_STATES);
      default: return sidx_t'(0);
    endcase
  endfunction

  // Output function omega: state number and input to output vector.
  function automatic out_t omega(int unsigned s, int unsigned x);
    out_t seg;
    unique case (s)
      0:       seg = 7'h3F;
      1:       seg = 7'h06;
      2:       seg = 7'h5B;
      3:       seg = 7'h4F;
      4:       seg = 7'h66;
      5:       seg = 7'h6D;
      6:       seg = 7'h7D;
      7:       seg = 7'h07;
      default: seg = 7'h7F;
    endcase
    return (x == 3) ? out_t'(0) : seg;
  endfunction

  // delta and omega laid out as the machines' table parameters.
  function automatic ns_table_t ns_table();
    ns_table_t t;
    for (int s = 0; s < NUM_STATES; s++)
      for (int x = 0; x < NX; x++)
        t[(s*NX + x)*SIDX_W +: SIDX_W] = delta(s, x);
    return t;
  endfunction

  function automatic out_table_t out_table();
    out_table_t t;
    for (int s = 0; s < NUM_STATES; s++)
      for (int x = 0; x < NX; x++)
        t[(s*NX + x)*NUM_OUTPUTS +: NUM_OUTPUTS] = omega(s, x);
    return t;
  endfunction

endpackage
