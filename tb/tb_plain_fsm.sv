// tb_plain_fsm: drives 2000 random inputs after reset and checks, every
// cycle, the state number and the Mealy outputs against the reference
// machine. The state must change one clock edge after the input that causes
// it (one-cycle transition latency).
module tb_plain_fsm;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] in;
  logic [6:0] out;
  logic [3:0] state;
  int ref_s;

  plain_fsm dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 2'b00;
    ref_s = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      in = 2'($urandom);
      if (t % 50 == 0) in = 2'b11;
      #1;
      checks += 2;
      if (int'(state) != ref_s) begin
        failures++;
        $display("FAIL t=%0d state %0d want %0d", t, state, ref_s);
      end
      if (out !== ref_out(ref_s, in)) begin
        failures++;
        $display("FAIL t=%0d out %h want %h", t, out, ref_out(ref_s, in));
      end
      @(posedge clk);
      ref_s = ref_next(ref_s, in);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
