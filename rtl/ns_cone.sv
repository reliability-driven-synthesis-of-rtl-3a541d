// ns_cone: the independent logic cone for one next-state bit.
//
// In the coding scheme each state flip-flop is fed by its own cone, with no
// gate shared with the cone of another flip-flop, so a single fault can upset
// at most one next-state bit; the distance-two state code then turns that
// upset into a word of odd parity. One instance of this module is made per
// state bit, and each instance builds its own decode of the present state and
// inputs: a product term per (state, input value) pair, OR-ed over the pairs
// whose next-state code has a one in bit BIT. The machine comes from
// the NS_TABLE parameter and the codes from state_assign_pkg. Present-state codes that
// no state uses decode to no term, so such a state leads to next-state bit 0.
// Purely combinational.
module ns_cone #(
  parameter int unsigned BIT         = 0,   // which next-state bit this cone drives
  parameter int unsigned NUM_INPUTS  = fsm_spec_pkg::NUM_INPUTS,
  parameter int unsigned NUM_STATES  = fsm_spec_pkg::NUM_STATES,
  localparam int unsigned NX     = 1 << NUM_INPUTS,
  localparam int unsigned SIDX_W = (NUM_STATES < 2) ? 1 : $clog2(NUM_STATES),
  // next state number of (state s, input x) at entry s*NX + x
  parameter logic [NUM_STATES*NX*SIDX_W-1:0] NS_TABLE = fsm_spec_pkg::ns_table(),
  localparam int unsigned W = state_assign_pkg::code_width(NUM_STATES)
) (
  input  logic [W-1:0]          state,  // present state code
  input  logic [NUM_INPUTS-1:0] in,     // primary inputs
  output logic                  ns      // next-state bit BIT
);

  localparam int unsigned NT    = NUM_STATES * NX;
  localparam int unsigned MAX_W = state_assign_pkg::MAX_W;
  localparam state_assign_pkg::code_table_t CODES = state_assign_pkg::all_codes(NUM_STATES);

  // Which product terms feed this cone: those whose next state's code has a
  // one in bit BIT.
  function automatic logic [NT-1:0] cone_mask();
    logic [NT-1:0] m;
    int unsigned   nxt;
    for (int e = 0; e < NT; e++) begin
      nxt  = int'(NS_TABLE[e*SIDX_W +: SIDX_W]);
      m[e] = CODES[nxt*MAX_W + BIT];
    end
    return m;
  endfunction

  localparam logic [NT-1:0] MASK = cone_mask();

  logic [NT-1:0] term;

  for (genvar j = 0; j < NUM_STATES; j++) begin : g_state
    localparam logic [W-1:0] CODE = CODES[j*MAX_W +: W];
    for (genvar x = 0; x < NX; x++) begin : g_in
      assign term[j*NX + x] = (state == CODE) && (in == NUM_INPUTS'(x));
    end
  end

  assign ns = |(term & MASK);

endmodule
