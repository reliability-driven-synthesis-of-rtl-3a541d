// coded_fsm: fault-secure realisation of the machine by coding (scheme 2).
//
// The machine given by the size and table parameters (default from
// fsm_spec_pkg) is built so that any single stuck-at fault
// inside it either leaves the outputs correct or is flagged on a dual-rail
// error pair in the same cycle the wrong value appears:
//
//   * State register: W flip-flops holding a minimum-distance-two code with
//     an even number of ones (state_assign_pkg). A fault in a flip-flop
//     flips one bit and gives an odd-parity word.
//   * Next-state logic: one independent ns_cone per flip-flop, so a fault in
//     it also upsets at most one bit of the next state.
//   * State checker: a tsc_parity_checker on the present state; its pair
//     state_err is a non-code word whenever the present state has odd parity.
//   * Output logic: berger_output_logic gives the outputs and the predicted
//     Berger check symbol with factors used in true form only, so a single
//     fault produces only unidirectional errors.
//   * Output checker: a berger_generator recomputes the check symbol from the
//     outputs and a tsc_eq_comparator compares it with the prediction; its
//     pair out_err is a non-code word on any unidirectional output error.
//   * A final two_rail_cell merges both pairs into err.
//
// Primary inputs are assumed fault-free. Interface: in is sampled on the
// rising edge of clk; out, state and the error pairs are combinational
// functions of the present state and in (Mealy). rst_n is asynchronous,
// active low, and loads the code of state 0 (all zeros). An error pair is
// good when it reads 01 or 10 and signals an error at 00 or 11.
module coded_fsm
  import tsc_pkg::*;
#(
  parameter int unsigned NUM_INPUTS  = fsm_spec_pkg::NUM_INPUTS,   // primary inputs
  parameter int unsigned NUM_OUTPUTS = fsm_spec_pkg::NUM_OUTPUTS,  // primary outputs
  parameter int unsigned NUM_STATES  = fsm_spec_pkg::NUM_STATES,   // states
  localparam int unsigned NX     = 1 << NUM_INPUTS,
  localparam int unsigned SIDX_W = (NUM_STATES < 2) ? 1 : $clog2(NUM_STATES),
  // next state number and output vector of (state s, input x) at entry s*NX + x
  parameter logic [NUM_STATES*NX*SIDX_W-1:0]      NS_TABLE  = fsm_spec_pkg::ns_table(),
  parameter logic [NUM_STATES*NX*NUM_OUTPUTS-1:0] OUT_TABLE = fsm_spec_pkg::out_table(),
  localparam int unsigned W = state_assign_pkg::code_width(NUM_STATES),
  localparam int unsigned K = tsc_pkg::berger_bits(NUM_OUTPUTS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_INPUTS-1:0]  in,
  output logic [NUM_OUTPUTS-1:0] out,
  output logic [W-1:0]           state,      // present state code
  output dual_rail_t             state_err,  // parity check of the state
  output dual_rail_t             out_err,    // Berger check of the outputs
  output dual_rail_t             err         // both checks merged
);

  logic [W-1:0] state_q;
  logic [W-1:0] state_d;
  logic [K-1:0] chk_pred;
  logic [K-1:0] chk_gen;

  // Next-state logic: one separate cone per flip-flop.
  for (genvar b = 0; b < W; b++) begin : g_cone
    ns_cone #(
      .BIT(b), .NUM_INPUTS(NUM_INPUTS), .NUM_STATES(NUM_STATES), .NS_TABLE(NS_TABLE)
    ) u_cone (.state(state_q), .in(in), .ns(state_d[b]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= '0;
    else        state_q <= state_d;
  end

  tsc_parity_checker #(.W(W)) u_parity (.d(state_q), .z(state_err));

  berger_output_logic #(
    .NUM_INPUTS(NUM_INPUTS), .NUM_OUTPUTS(NUM_OUTPUTS), .NUM_STATES(NUM_STATES),
    .OUT_TABLE(OUT_TABLE)
  ) u_out (.state(state_q), .in(in), .out(out), .chk(chk_pred));

  berger_generator #(.I(NUM_OUTPUTS)) u_bgen (.info(out), .check(chk_gen));

  tsc_eq_comparator #(.N(K)) u_bcmp (.x(chk_pred), .y(chk_gen), .z(out_err));

  two_rail_cell u_merge (.a(state_err), .b(out_err), .z(err));

  assign state = state_q;

endmodule
