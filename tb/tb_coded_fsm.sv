// tb_coded_fsm: checks the coding-scheme machine in two phases.
//
// 1. Fault-free: 1000 random inputs after reset. Every cycle the outputs and
//    the state code must match the reference machine and all three error
//    pairs must read as code words (no false alarm); the state must change one
//    clock edge after the input that causes it.
// 2. Single stuck-at faults, one at a time, each forced onto a net of the
//    machine for up to 300 random cycles after reset: every state flip-flop,
//    every next-state cone output, every product term of the output logic,
//    every primary output and every predicted check bit, stuck at 0 and at 1.
//    In every cycle up to the first alarm the outputs and state must be
//    correct (fault-secure property). Every fault class must raise the
//    matching alarm (state parity or Berger) at least once.
module tb_coded_fsm;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NTERM = 36;
  // Fault numbering: 2*site + stuck value.
  localparam int F_Q    = 0;                  // state flip-flops, 5 sites
  localparam int F_D    = F_Q + 10;           // next-state cone outputs, 5 sites
  localparam int F_T    = F_D + 10;           // output-logic product terms
  localparam int F_O    = F_T + 2 * NTERM;    // primary outputs, 7 sites
  localparam int F_C    = F_O + 14;           // predicted check bits, 3 sites
  localparam int F_NUM  = F_C + 6;
  localparam int F_NONE = -1;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] in;
  logic [6:0] out;
  logic [4:0] state;
  dual_rail_t state_err, out_err, err;
  int ref_s;
  int fault_id = F_NONE;

  coded_fsm dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out), .state(state),
                 .state_err(state_err), .out_err(out_err), .err(err));

  always #5 clk = ~clk;

  // Fault injection: each site forces its net while fault_id selects it.
  for (genvar b = 0; b < 5; b++) begin : g_fq
    always @(fault_id) begin
      if (fault_id == F_Q + 2*b)          force dut.state_q[b] = 1'b0;
      else if (fault_id == F_Q + 2*b + 1) force dut.state_q[b] = 1'b1;
      else                                release dut.state_q[b];
      if (fault_id == F_D + 2*b)          force dut.state_d[b] = 1'b0;
      else if (fault_id == F_D + 2*b + 1) force dut.state_d[b] = 1'b1;
      else                                release dut.state_d[b];
    end
  end
  for (genvar k = 0; k < NTERM; k++) begin : g_ft
    always @(fault_id) begin
      if (fault_id == F_T + 2*k)          force dut.u_out.term[k] = 1'b0;
      else if (fault_id == F_T + 2*k + 1) force dut.u_out.term[k] = 1'b1;
      else                                release dut.u_out.term[k];
    end
  end
  for (genvar o = 0; o < 7; o++) begin : g_fo
    always @(fault_id) begin
      if (fault_id == F_O + 2*o)          force dut.out[o] = 1'b0;
      else if (fault_id == F_O + 2*o + 1) force dut.out[o] = 1'b1;
      else                                release dut.out[o];
    end
  end
  for (genvar c = 0; c < 3; c++) begin : g_fc
    always @(fault_id) begin
      if (fault_id == F_C + 2*c)          force dut.chk_pred[c] = 1'b0;
      else if (fault_id == F_C + 2*c + 1) force dut.chk_pred[c] = 1'b1;
      else                                release dut.chk_pred[c];
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    in = 2'b00;
    ref_s = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  function automatic string class_name(int f);
    if (f < F_D) return "flip-flop";
    if (f < F_T) return "next-state cone";
    if (f < F_O) return "output term";
    if (f < F_C) return "primary output";
    return "check bit";
  endfunction

  int det_state = 0, det_out = 0, silent = 0;
  int det_class [5];

  initial begin
    // Phase 1: fault-free operation.
    do_reset();
    for (int t = 0; t < 1000; t++) begin
      in = 2'($urandom);
      #1;
      checks += 5;
      if (out !== ref_out(ref_s, in)) begin
        failures++;
        $display("FAIL t=%0d out %h want %h", t, out, ref_out(ref_s, in));
      end
      if (state !== CODE9[ref_s]) begin
        failures++;
        $display("FAIL t=%0d state %b want %b", t, state, CODE9[ref_s]);
      end
      if (!is_code(state_err)) begin failures++; $display("FAIL t=%0d false state alarm", t); end
      if (!is_code(out_err))   begin failures++; $display("FAIL t=%0d false output alarm", t); end
      if (!is_code(err))       begin failures++; $display("FAIL t=%0d false merged alarm", t); end
      @(posedge clk);
      ref_s = ref_next(ref_s, in);
      @(negedge clk);
    end

    // Phase 2: single stuck-at faults.
    foreach (det_class[i]) det_class[i] = 0;
    for (int f = 0; f < F_NUM; f++) begin
      bit detected;
      fault_id = F_NONE;
      do_reset();
      fault_id = f;
      detected = 0;
      for (int t = 0; t < 300 && !detected; t++) begin
        in = 2'($urandom);
        #1;
        if (!is_code(err)) begin
          detected = 1;
          if (!is_code(state_err)) det_state++;
          if (!is_code(out_err))   det_out++;
          det_class[(f < F_D) ? 0 : (f < F_T) ? 1 : (f < F_O) ? 2 : (f < F_C) ? 3 : 4]++;
        end else begin
          checks++;
          if (out !== ref_out(ref_s, in) || state !== CODE9[ref_s]) begin
            failures++;
            $display("FAIL fault %0d (%s) t=%0d: wrong value without alarm", f, class_name(f), t);
          end
        end
        @(posedge clk);
        ref_s = ref_next(ref_s, in);
        @(negedge clk);
      end
      if (!detected) silent++;
    end
    fault_id = F_NONE;

    $display("faults=%0d detected by state parity=%0d by Berger=%0d never active=%0d",
             F_NUM, det_state, det_out, silent);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (det_class[i] == 0) begin
        failures++;
        $display("FAIL no fault of class %0d was ever detected", i);
      end
    end
    checks += 2;
    if (det_state == 0) begin failures++; $display("FAIL state parity alarm never raised"); end
    if (det_out == 0)   begin failures++; $display("FAIL Berger alarm never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
