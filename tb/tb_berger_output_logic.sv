// tb_berger_output_logic: for every five-bit state code and input value,
// compares the outputs with the reference machine and the predicted check
// bits with the number of zeros among those outputs. Unused codes must give
// all-zero outputs and check bits (a non-code Berger word).
module tb_berger_output_logic;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [4:0] state;
  logic [1:0] in;
  logic [6:0] out;
  logic [2:0] chk;

  berger_output_logic dut (.state(state), .in(in), .out(out), .chk(chk));

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
        logic [6:0] want_o;
        logic [2:0] want_c;
        state = 5'(c); in = 2'(x);
        #1;
        s = code_index(state);
        want_o = (s < 0) ? 7'h00 : ref_out(s, in);
        want_c = (s < 0) ? 3'd0 : 3'(zeros7(want_o));
        checks += 2;
        if (out !== want_o) begin
          failures++;
          $display("FAIL out state=%b in=%b got %h want %h", state, in, out, want_o);
        end
        if (chk !== want_c) begin
          failures++;
          $display("FAIL chk state=%b in=%b got %0d want %0d", state, in, chk, want_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
