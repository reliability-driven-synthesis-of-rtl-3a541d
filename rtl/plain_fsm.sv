// plain_fsm: a Mealy machine given by tables, with no checking.
//
// A bank of flip-flops holds the state number in compact binary encoding
// (ceil(log2 S) bits); combinational logic looks the next state up in
// NS_TABLE and the outputs in OUT_TABLE. It has no
// checking of its own: it is the unit that the duplication scheme copies.
// in is sampled on the rising edge of clk, out is combinational in the
// present state and in. rst_n is asynchronous, active low, and selects
// state 0. State numbers that name no state (possible with a fault) lead to
// state 0 with all outputs 0.
module plain_fsm #(
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
  output logic [SIDX_W-1:0]      state     // present state number
);

  logic [SIDX_W-1:0] state_q;
  logic [SIDX_W-1:0] state_d;
  int unsigned       e;                    // table entry of (state_q, in)

  always_comb begin
    e = int'(state_q) * NX + int'(in);
    if (int'(state_q) < NUM_STATES) begin
      state_d = NS_TABLE[e*SIDX_W +: SIDX_W];
      out     = OUT_TABLE[e*NUM_OUTPUTS +: NUM_OUTPUTS];
    end else begin
      state_d = '0;
      out     = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= '0;
    else        state_q <= state_d;
  end

  assign state = state_q;

endmodule
