// dup_fsm: fault-secure realisation of the machine by duplication (scheme 1).
//
// Two identical copies of the machine (plain_fsm, given by the size and
// table parameters, default from fsm_spec_pkg) run side by side on the
// same inputs, each with its own flip-flops and logic. A totally
// self-checking equality comparator compares the primary outputs of the two
// copies every cycle and reports on the dual-rail pair err: 01 or 10 when
// they agree, 00 or 11 when they differ or when the comparator itself is
// faulty. The outputs of copy A are the machine's outputs. A fault that
// corrupts only the state of one copy is flagged as soon as it changes that
// copy's outputs. Timing is that of plain_fsm: outputs and err are
// combinational in the present state and in; rst_n is asynchronous, active
// low, and resets both copies to state 0.
module dup_fsm
  import tsc_pkg::*;
#(
  parameter int unsigned NUM_INPUTS  = fsm_spec_pkg::NUM_INPUTS,   // primary inputs
  parameter int unsigned NUM_OUTPUTS = fsm_spec_pkg::NUM_OUTPUTS,  // primary outputs
  parameter int unsigned NUM_STATES  = fsm_spec_pkg::NUM_STATES,   // states
  localparam int unsigned NX     = 1 << NUM_INPUTS,
  localparam int unsigned SIDX_W = (NUM_STATES < 2) ? 1 : $clog2(NUM_STATES),
  // next state number and output vector of (state s, input x) at entry s*NX + x
  parameter logic [NUM_STATES*NX*SIDX_W-1:0]      NS_TABLE  = fsm_spec_pkg::ns_table(),
  parameter logic [NUM_STATES*NX*NUM_OUTPUTS-1:0] OUT_TABLE = fsm_spec_pkg::out_table()
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_INPUTS-1:0]  in,
  output logic [NUM_OUTPUTS-1:0] out,
  output logic [SIDX_W-1:0]      state,    // present state number of copy A
  output dual_rail_t             err
);

  logic [NUM_OUTPUTS-1:0] out_a, out_b;

  plain_fsm #(
    .NUM_INPUTS(NUM_INPUTS), .NUM_OUTPUTS(NUM_OUTPUTS), .NUM_STATES(NUM_STATES),
    .NS_TABLE(NS_TABLE), .OUT_TABLE(OUT_TABLE)
  ) u_copy_a (.clk(clk), .rst_n(rst_n), .in(in), .out(out_a), .state(state));

  plain_fsm #(
    .NUM_INPUTS(NUM_INPUTS), .NUM_OUTPUTS(NUM_OUTPUTS), .NUM_STATES(NUM_STATES),
    .NS_TABLE(NS_TABLE), .OUT_TABLE(OUT_TABLE)
  ) u_copy_b (.clk(clk), .rst_n(rst_n), .in(in), .out(out_b), .state());

  tsc_eq_comparator #(.N(NUM_OUTPUTS)) u_cmp (.x(out_a), .y(out_b), .z(err));

  assign out = out_a;

endmodule
