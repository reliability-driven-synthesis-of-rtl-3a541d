// tb_two_rail_cell: applies all 16 combinations of two dual-rail pairs and
// checks that the output is a code word exactly when both inputs are, and that
// for code inputs it reads 10 when the two pairs are equal and 01 otherwise.
module tb_two_rail_cell;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  dual_rail_t a, b, z;

  two_rail_cell dut (.a(a), .b(b), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (((z.z1 != z.z0)) != ((a.z1 != a.z0) && (b.z1 != b.z0))) begin
        failures++;
        $display("FAIL code property a=%b b=%b z=%b", a, b, z);
      end
      if ((a.z1 != a.z0) && (b.z1 != b.z0)) begin
        checks++;
        if (z.z1 != (a.z1 == b.z1)) begin
          failures++;
          $display("FAIL value a=%b b=%b z=%b", a, b, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
