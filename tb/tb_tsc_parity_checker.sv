// tb_tsc_parity_checker: applies all 32 words to the default 5-bit checker
// and all 256 to an 8-bit one; the output must be a code word exactly for the
// words with an even number of ones.
module tb_tsc_parity_checker;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  logic [4:0] d5;
  logic [7:0] d8;
  dual_rail_t z5, z8;

  tsc_parity_checker          dut5 (.d(d5), .z(z5));
  tsc_parity_checker #(.W(8)) dut8 (.d(d8), .z(z8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      d5 = 5'(i); d8 = 8'(i);
      #1;
      if (i < 32) begin
        checks++;
        if ((z5.z1 != z5.z0) != ($countones(d5) % 2 == 0)) begin
          failures++;
          $display("FAIL W=5 d=%b z=%b", d5, z5);
        end
      end
      checks++;
      if ((z8.z1 != z8.z0) != ($countones(d8) % 2 == 0)) begin
        failures++;
        $display("FAIL W=8 d=%b z=%b", d8, z8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
