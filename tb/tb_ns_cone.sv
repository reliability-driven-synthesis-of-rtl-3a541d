// tb_ns_cone: builds one ns_cone per state bit and, for every present-state
// code (all 32 five-bit words) and every input value, compares the assembled
// next-state code with the reference machine: the code of the next state for
// a valid present state, all zeros for a code that no state uses.
module tb_ns_cone;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [4:0] state;
  logic [1:0] in;
  logic [4:0] ns;

  for (genvar b = 0; b < 5; b++) begin : g_bit
    ns_cone #(.BIT(b)) dut (.state(state), .in(in), .ns(ns[b]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      for (int x = 0; x < 4; x++) begin
        int s;
        logic [4:0] want;
        state = 5'(c); in = 2'(x);
        #1;
        s = code_index(state);
        want = (s < 0) ? 5'b0 : CODE9[ref_next(s, in)];
        checks++;
        if (ns !== want) begin
          failures++;
          $display("FAIL state=%b in=%b ns=%b want %b", state, in, ns, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
