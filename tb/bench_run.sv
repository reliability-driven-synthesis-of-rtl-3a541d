// bench_run: runs both fault-secure machines on one synthetic machine of a
// given size and reports what it saw.
//
// The machine has NI inputs, NO outputs and NS states; its next-state and
// output tables are filled from a hash of the table entry and SEED, so every
// size gets a different, fully specified transition graph. bench_run builds
// fault_secure_fsm_top for it, runs CYCLES random inputs fault-free (outputs
// checked against direct table look-up, coded state against its assigned
// code, no error pair may alarm), then injects three faults in turn: a
// coded-machine state flip-flop stuck at 1, a coded-machine output stuck at 0
// and a duplicated-machine copy-B flip-flop stuck at 1. Up to the first alarm
// the outputs must stay correct. It raises done when finished, with its
// counts on the output ports.
module bench_run
  import tsc_pkg::*;
#(
  parameter int unsigned NI     = 2,
  parameter int unsigned NO     = 1,
  parameter int unsigned NS     = 4,
  parameter int unsigned SEED   = 1,
  parameter int unsigned CYCLES = 500
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   alarms_parity,
  output int   alarms_berger,
  output int   alarms_dup
);

  localparam int unsigned NX     = 1 << NI;
  localparam int unsigned SIDX_W = (NS < 2) ? 1 : $clog2(NS);
  localparam int unsigned W      = state_assign_pkg::code_width(NS);

  function automatic int unsigned hash(int unsigned e, int unsigned salt);
    int unsigned h;
    h = e * 32'h9E3779B1 + salt * 32'h85EBCA6B + SEED * 32'hC2B2AE35;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    return h ^ (h >> 15);
  endfunction

  function automatic logic [NS*NX*SIDX_W-1:0] make_ns();
    logic [NS*NX*SIDX_W-1:0] t;
    for (int e = 0; e < NS*NX; e++) t[e*SIDX_W +: SIDX_W] = SIDX_W'(hash(e, 1) % NS);
    return t;
  endfunction

  function automatic logic [NS*NX*NO-1:0] make_out();
    logic [NS*NX*NO-1:0] t;
    for (int e = 0; e < NS*NX; e++) t[e*NO +: NO] = NO'(hash(e, 2));
    return t;
  endfunction

  localparam logic [NS*NX*SIDX_W-1:0] NS_T  = make_ns();
  localparam logic [NS*NX*NO-1:0]     OUT_T = make_out();

  logic rst_n = 0;
  logic [NI-1:0] dup_in, coded_in;
  logic [NO-1:0] dup_out, coded_out;
  logic [SIDX_W-1:0] dup_state;
  logic [W-1:0] coded_state;
  dual_rail_t dup_err, coded_state_err, coded_out_err, coded_err;

  fault_secure_fsm_top #(
    .NUM_INPUTS(NI), .NUM_OUTPUTS(NO), .NUM_STATES(NS), .NS_TABLE(NS_T), .OUT_TABLE(OUT_T)
  ) u_top (
    .clk(clk), .rst_n(rst_n),
    .dup_in(dup_in), .dup_out(dup_out), .dup_state(dup_state), .dup_err(dup_err),
    .coded_in(coded_in), .coded_out(coded_out), .coded_state(coded_state),
    .coded_state_err(coded_state_err), .coded_out_err(coded_out_err), .coded_err(coded_err));

  int fault_id = 0;
  always @(fault_id) begin
    if (fault_id == 1) force u_top.u_coded.state_q[0] = 1'b1; else release u_top.u_coded.state_q[0];
    if (fault_id == 2) force u_top.u_coded.out[0] = 1'b0; else release u_top.u_coded.out[0];
    if (fault_id == 3) force u_top.u_dup.u_copy_b.state_q[0] = 1'b1; else release u_top.u_dup.u_copy_b.state_q[0];
  end

  int ref_d, ref_c;

  function automatic logic [NO-1:0] ref_out(int s, logic [NI-1:0] x);
    return OUT_T[(s*NX + int'(x))*NO +: NO];
  endfunction

  function automatic int ref_next(int s, logic [NI-1:0] x);
    return int'(NS_T[(s*NX + int'(x))*SIDX_W +: SIDX_W]);
  endfunction

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    dup_in = '0;
    coded_in = '0;
    ref_d = 0;
    ref_c = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  task automatic step();
    @(posedge clk);
    ref_d = ref_next(ref_d, dup_in);
    ref_c = ref_next(ref_c, coded_in);
    @(negedge clk);
  endtask

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    alarms_parity = 0;
    alarms_berger = 0;
    alarms_dup = 0;
    do_reset();
    for (int t = 0; t < int'(CYCLES); t++) begin
      dup_in = NI'($urandom);
      coded_in = NI'($urandom);
      #1;
      checks += 6;
      if (dup_out !== ref_out(ref_d, dup_in)) failures++;
      if (coded_out !== ref_out(ref_c, coded_in)) failures++;
      if (coded_state !== W'(state_assign_pkg::state_code(NS, ref_c))) failures++;
      if (!is_code(dup_err)) failures++;
      if (!is_code(coded_state_err)) failures++;
      if (!is_code(coded_out_err)) failures++;
      step();
    end
    for (int f = 1; f <= 3; f++) begin
      bit detected;
      fault_id = 0;
      do_reset();
      fault_id = f;
      detected = 0;
      for (int t = 0; t < 400 && !detected; t++) begin
        dup_in = NI'($urandom);
        coded_in = NI'($urandom);
        #1;
        if (f < 3 && !is_code(coded_err)) begin
          detected = 1;
          if (!is_code(coded_state_err)) alarms_parity++;
          if (!is_code(coded_out_err)) alarms_berger++;
        end else if (f == 3 && !is_code(dup_err)) begin
          detected = 1;
          alarms_dup++;
        end else begin
          checks++;
          if (f < 3 && coded_out !== ref_out(ref_c, coded_in)) failures++;
          if (f == 3 && dup_out !== ref_out(ref_d, dup_in)) failures++;
        end
        step();
      end
    end
    fault_id = 0;
    $display("NI=%0d NO=%0d NS=%0d: checks=%0d failures=%0d alarms parity=%0d Berger=%0d duplication=%0d",
             NI, NO, NS, checks, failures, alarms_parity, alarms_berger, alarms_dup);
    done = 1;
  end

endmodule
