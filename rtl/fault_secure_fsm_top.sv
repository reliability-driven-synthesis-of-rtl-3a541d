// fault_secure_fsm_top: the two fault-secure realisations of one machine.
//
// The machine given by the size and table parameters (default: the example
// of fsm_spec_pkg) is built twice, once per checking scheme, and
// the two stand side by side with their own inputs and outputs:
//   * dup_*   : duplication with a totally self-checking output comparator
//               (dup_fsm), cheaper for small machines;
//   * coded_* : distance-two even-parity state code with independent
//               next-state cones, and Berger-coded output logic (coded_fsm),
//               cheaper for large machines.
// Both share clk and the asynchronous active-low reset rst_n. Every error
// output is a dual-rail pair (z1, z0): 01 or 10 means no error, 00 or 11
// means an error was detected in that cycle. Outputs are Mealy outputs:
// combinational in the present state and the inputs.
module fault_secure_fsm_top
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
  localparam int unsigned W = state_assign_pkg::code_width(NUM_STATES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // scheme 1: duplication
  input  logic [NUM_INPUTS-1:0]  dup_in,
  output logic [NUM_OUTPUTS-1:0] dup_out,
  output logic [SIDX_W-1:0]      dup_state,
  output dual_rail_t             dup_err,
  // scheme 2: coding
  input  logic [NUM_INPUTS-1:0]  coded_in,
  output logic [NUM_OUTPUTS-1:0] coded_out,
  output logic [W-1:0]           coded_state,
  output dual_rail_t             coded_state_err,
  output dual_rail_t             coded_out_err,
  output dual_rail_t             coded_err
);

  dup_fsm #(
    .NUM_INPUTS(NUM_INPUTS), .NUM_OUTPUTS(NUM_OUTPUTS), .NUM_STATES(NUM_STATES),
    .NS_TABLE(NS_TABLE), .OUT_TABLE(OUT_TABLE)
  ) u_dup (
    .clk   (clk),
    .rst_n (rst_n),
    .in    (dup_in),
    .out   (dup_out),
    .state (dup_state),
    .err   (dup_err)
  );

  coded_fsm #(
    .NUM_INPUTS(NUM_INPUTS), .NUM_OUTPUTS(NUM_OUTPUTS), .NUM_STATES(NUM_STATES),
    .NS_TABLE(NS_TABLE), .OUT_TABLE(OUT_TABLE)
  ) u_coded (
    .clk       (clk),
    .rst_n     (rst_n),
    .in        (coded_in),
    .out       (coded_out),
    .state     (coded_state),
    .state_err (coded_state_err),
    .out_err   (coded_out_err),
    .err       (coded_err)
  );

endmodule
