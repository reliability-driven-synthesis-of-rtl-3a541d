// tb_dup_fsm: checks the duplication-scheme machine in two phases.
//
// 1. Fault-free: 1000 random inputs after reset; outputs and state must match
//    the reference machine every cycle and the comparator pair must read as a
//    code word (no false alarm).
// 2. Single stuck-at faults on every state flip-flop and every output of
//    either copy, one at a time, for up to 300 random cycles after reset. In
//    every cycle up to the first alarm the machine's outputs must be correct;
//    faults in both copies must be caught at least once.
module tb_dup_fsm;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  // Fault numbering: 2*site + stuck value.
  localparam int F_QA   = 0;            // copy A state flip-flops, 4 sites
  localparam int F_QB   = F_QA + 8;     // copy B state flip-flops
  localparam int F_OA   = F_QB + 8;     // copy A outputs, 7 sites
  localparam int F_OB   = F_OA + 14;    // copy B outputs
  localparam int F_NUM  = F_OB + 14;
  localparam int F_NONE = -1;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] in;
  logic [6:0] out;
  logic [3:0] state;
  dual_rail_t err;
  int ref_s;
  int fault_id = F_NONE;

  dup_fsm dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out), .state(state), .err(err));

  always #5 clk = ~clk;

  for (genvar b = 0; b < 4; b++) begin : g_fq
    always @(fault_id) begin
      if (fault_id == F_QA + 2*b)          force dut.u_copy_a.state_q[b] = 1'b0;
      else if (fault_id == F_QA + 2*b + 1) force dut.u_copy_a.state_q[b] = 1'b1;
      else                                 release dut.u_copy_a.state_q[b];
      if (fault_id == F_QB + 2*b)          force dut.u_copy_b.state_q[b] = 1'b0;
      else if (fault_id == F_QB + 2*b + 1) force dut.u_copy_b.state_q[b] = 1'b1;
      else                                 release dut.u_copy_b.state_q[b];
    end
  end
  for (genvar o = 0; o < 7; o++) begin : g_fo
    always @(fault_id) begin
      if (fault_id == F_OA + 2*o)          force dut.out_a[o] = 1'b0;
      else if (fault_id == F_OA + 2*o + 1) force dut.out_a[o] = 1'b1;
      else                                 release dut.out_a[o];
      if (fault_id == F_OB + 2*o)          force dut.out_b[o] = 1'b0;
      else if (fault_id == F_OB + 2*o + 1) force dut.out_b[o] = 1'b1;
      else                                 release dut.out_b[o];
    end
  end

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
    in = 2'b00;
    ref_s = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  int det_a = 0, det_b = 0, silent = 0;

  initial begin
    do_reset();
    for (int t = 0; t < 1000; t++) begin
      in = 2'($urandom);
      #1;
      checks += 3;
      if (out !== ref_out(ref_s, in)) begin
        failures++;
        $display("FAIL t=%0d out %h want %h", t, out, ref_out(ref_s, in));
      end
      if (int'(state) != ref_s) begin
        failures++;
        $display("FAIL t=%0d state %0d want %0d", t, state, ref_s);
      end
      if (!is_code(err)) begin failures++; $display("FAIL t=%0d false alarm", t); end
      @(posedge clk);
      ref_s = ref_next(ref_s, in);
      @(negedge clk);
    end

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
          if ((f >= F_QA && f < F_QB) || (f >= F_OA && f < F_OB)) det_a++;
          else det_b++;
        end else begin
          checks++;
          if (out !== ref_out(ref_s, in)) begin
            failures++;
            $display("FAIL fault %0d t=%0d: wrong output without alarm", f, t);
          end
        end
        @(posedge clk);
        ref_s = ref_next(ref_s, in);
        @(negedge clk);
      end
      if (!detected) silent++;
    end
    fault_id = F_NONE;

    $display("faults=%0d detected in copy A=%0d in copy B=%0d never active=%0d",
             F_NUM, det_a, det_b, silent);
    checks += 2;
    if (det_a == 0) begin failures++; $display("FAIL no copy A fault detected"); end
    if (det_b == 0) begin failures++; $display("FAIL no copy B fault detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
