// berger_output_logic: output logic whose result is Berger coded.
//
// Produces the primary outputs of the machine together with the Berger check
// symbol that those outputs should have (the number of zeros among them),
// both as functions of the present state code and the primary inputs. The
// check symbol is thus predicted from the same inputs rather than computed
// from the outputs; a separate Berger generator recomputes it from the outputs
// and a comparator checks that the two agree.
//
// A Berger code detects every unidirectional error, so a single fault inside
// this logic must never push one output up and another down. The logic is
// therefore built so that every shared factor is used only in its true
// (uninverted) form: a plane of product terms, one per (state, input value)
// pair, shared by all outputs, and for each output and each check bit an OR
// of the terms for which it is 1. A stuck-at fault on a term can then only
// move outputs from 0 to 1 (stuck-at-1) or from 1 to 0 (stuck-at-0). Codes
// that no state uses select no term: all outputs and check bits are 0, which
// is not a Berger code word. Purely combinational.
module berger_output_logic #(
  parameter int unsigned NUM_INPUTS  = fsm_spec_pkg::NUM_INPUTS,
  parameter int unsigned NUM_OUTPUTS = fsm_spec_pkg::NUM_OUTPUTS,
  parameter int unsigned NUM_STATES  = fsm_spec_pkg::NUM_STATES,
  localparam int unsigned NX = 1 << NUM_INPUTS,
  // output vector of (state s, input x) at entry s*NX + x
  parameter logic [NUM_STATES*NX*NUM_OUTPUTS-1:0] OUT_TABLE = fsm_spec_pkg::out_table(),
  localparam int unsigned W = state_assign_pkg::code_width(NUM_STATES),
  localparam int unsigned K = tsc_pkg::berger_bits(NUM_OUTPUTS)
) (
  input  logic [W-1:0]           state,  // present state code
  input  logic [NUM_INPUTS-1:0]  in,     // primary inputs
  output logic [NUM_OUTPUTS-1:0] out,    // primary outputs
  output logic [K-1:0]           chk     // predicted Berger check symbol
);

  localparam int unsigned NT    = NUM_STATES * NX;
  localparam int unsigned MAX_W = state_assign_pkg::MAX_W;
  localparam state_assign_pkg::code_table_t CODES = state_assign_pkg::all_codes(NUM_STATES);

  // Terms that make primary output o high.
  function automatic logic [NT-1:0] out_mask(int unsigned o);
    logic [NT-1:0] m;
    for (int e = 0; e < NT; e++) m[e] = OUT_TABLE[e*NUM_OUTPUTS + o];
    return m;
  endfunction

  // Terms that make check bit b high: bit b of the number of zero outputs.
  function automatic logic [NT-1:0] chk_mask(int unsigned b);
    logic [NT-1:0] m;
    int unsigned   zeros;
    for (int e = 0; e < NT; e++) begin
      zeros = NUM_OUTPUTS - $countones(OUT_TABLE[e*NUM_OUTPUTS +: NUM_OUTPUTS]);
      m[e]  = 1'((zeros >> b) & 1);
    end
    return m;
  endfunction

  logic [NT-1:0] term;

  for (genvar j = 0; j < NUM_STATES; j++) begin : g_state
    localparam logic [W-1:0] CODE = CODES[j*MAX_W +: W];
    for (genvar x = 0; x < NX; x++) begin : g_in
      assign term[j*NX + x] = (state == CODE) && (in == NUM_INPUTS'(x));
    end
  end

  for (genvar o = 0; o < NUM_OUTPUTS; o++) begin : g_out
    localparam logic [NT-1:0] MASK = out_mask(o);
    assign out[o] = |(term & MASK);
  end

  for (genvar b = 0; b < K; b++) begin : g_chk
    localparam logic [NT-1:0] MASK = chk_mask(b);
    assign chk[b] = |(term & MASK);
  end

endmodule
