// tb_fault_secure_fsm_top: end-to-end test of both realisations at their
// default sizes.
//
// Phase 1 runs both machines on independent random input streams for 3000
// cycles and compares outputs and states with the reference machine; every
// error pair must read as a code word. It counts each kind of transition of
// the machine (hold, step up, step down, wrap-around in both directions,
// return to 0 with blank display) and fails if one never happened.
// Phase 2 injects one stuck-at fault at a time: into a state flip-flop of the
// coded machine (caught by the parity checker), into a product term and into
// an output of its output logic (caught by the Berger checker), and into
// the state of either copy of the duplicated machine (caught by the
// comparator). Up to the first alarm, outputs must stay correct; each kind of
// alarm must be raised at least once.
module tb_fault_secure_fsm_top;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] dup_in, coded_in;
  logic [6:0] dup_out, coded_out;
  logic [3:0] dup_state;
  logic [4:0] coded_state;
  dual_rail_t dup_err, coded_state_err, coded_out_err, coded_err;
  int ref_d, ref_c;

  fault_secure_fsm_top dut (
    .clk(clk), .rst_n(rst_n),
    .dup_in(dup_in), .dup_out(dup_out), .dup_state(dup_state), .dup_err(dup_err),
    .coded_in(coded_in), .coded_out(coded_out), .coded_state(coded_state),
    .coded_state_err(coded_state_err), .coded_out_err(coded_out_err),
    .coded_err(coded_err));

  always #5 clk = ~clk;

  // Fault sites, selected by fault_id.
  int fault_id = 0;
  always @(fault_id) begin
    if (fault_id == 1) force dut.u_coded.state_q[2] = 1'b1; else release dut.u_coded.state_q[2];
    if (fault_id == 2) force dut.u_coded.u_out.term[13] = 1'b1; else release dut.u_coded.u_out.term[13];
    if (fault_id == 3) force dut.u_coded.out[6] = 1'b0; else release dut.u_coded.out[6];
    if (fault_id == 4) force dut.u_dup.u_copy_a.state_q[0] = 1'b1; else release dut.u_dup.u_copy_a.state_q[0];
    if (fault_id == 5) force dut.u_dup.u_copy_b.state_q[1] = 1'b1; else release dut.u_dup.u_copy_b.state_q[1];
  end

  // Transition kinds seen: 0 hold, 1 step up, 2 step down, 3 wrap 8->0,
  // 4 wrap 0->8, 5 return to 0.
  int seen [6];
  int alarm_parity = 0, alarm_berger = 0, alarm_merged = 0, alarm_dup = 0;

  function automatic int kind(int s, logic [1:0] x);
    case (x)
      2'b00:   return 0;
      2'b01:   return (s == 8) ? 3 : 1;
      2'b10:   return (s == 0) ? 4 : 2;
      default: return 5;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    dup_in = 2'b00;
    coded_in = 2'b00;
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
    foreach (seen[i]) seen[i] = 0;
    do_reset();
    for (int t = 0; t < 3000; t++) begin
      // Favour the step inputs so both wrap-arounds happen often.
      dup_in   = ($urandom_range(9) == 0) ? 2'b11 : 2'($urandom_range(2));
      coded_in = ($urandom_range(9) == 0) ? 2'b11 : 2'($urandom_range(2));
      #1;
      seen[kind(ref_d, dup_in)]++;
      seen[kind(ref_c, coded_in)]++;
      checks += 8;
      if (dup_out !== ref_out(ref_d, dup_in)) begin failures++; $display("FAIL t=%0d dup out", t); end
      if (int'(dup_state) != ref_d) begin failures++; $display("FAIL t=%0d dup state", t); end
      if (coded_out !== ref_out(ref_c, coded_in)) begin failures++; $display("FAIL t=%0d coded out", t); end
      if (coded_state !== CODE9[ref_c]) begin failures++; $display("FAIL t=%0d coded state", t); end
      if (!is_code(dup_err))         begin failures++; $display("FAIL t=%0d dup false alarm", t); end
      if (!is_code(coded_state_err)) begin failures++; $display("FAIL t=%0d parity false alarm", t); end
      if (!is_code(coded_out_err))   begin failures++; $display("FAIL t=%0d Berger false alarm", t); end
      if (!is_code(coded_err))       begin failures++; $display("FAIL t=%0d merged false alarm", t); end
      step();
    end

    for (int f = 1; f <= 5; f++) begin
      bit detected;
      fault_id = 0;
      do_reset();
      fault_id = f;
      detected = 0;
      for (int t = 0; t < 500 && !detected; t++) begin
        dup_in   = 2'($urandom);
        coded_in = 2'($urandom);
        #1;
        if (f <= 3) begin
          if (!is_code(coded_err)) begin
            detected = 1;
            alarm_merged++;
            if (!is_code(coded_state_err)) alarm_parity++;
            if (!is_code(coded_out_err))   alarm_berger++;
          end else begin
            checks++;
            if (coded_out !== ref_out(ref_c, coded_in)) begin
              failures++;
              $display("FAIL fault %0d t=%0d coded output wrong without alarm", f, t);
            end
          end
        end else begin
          if (!is_code(dup_err)) begin
            detected = 1;
            alarm_dup++;
          end else begin
            checks++;
            if (dup_out !== ref_out(ref_d, dup_in)) begin
              failures++;
              $display("FAIL fault %0d t=%0d dup output wrong without alarm", f, t);
            end
          end
        end
        step();
      end
      checks++;
      if (!detected) begin
        failures++;
        $display("FAIL fault %0d never detected", f);
      end
    end
    fault_id = 0;

    $display("transitions: hold=%0d up=%0d down=%0d wrap-up=%0d wrap-down=%0d to-zero=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("alarms: parity=%0d Berger=%0d merged=%0d duplication=%0d",
             alarm_parity, alarm_berger, alarm_merged, alarm_dup);
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL transition kind %0d never happened", i); end
    end
    checks += 4;
    if (alarm_parity == 0) begin failures++; $display("FAIL parity alarm never raised"); end
    if (alarm_berger == 0) begin failures++; $display("FAIL Berger alarm never raised"); end
    if (alarm_merged == 0) begin failures++; $display("FAIL merged alarm never raised"); end
    if (alarm_dup == 0)    begin failures++; $display("FAIL duplication alarm never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
