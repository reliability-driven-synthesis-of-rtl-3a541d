// tb_two_rail_checker: for N = 4 (default) applies all 256 combinations of
// the four pairs, and for N = 7 a random sample with one pair corrupted at a
// time; the output must be a code word exactly when every input pair is one.
module tb_two_rail_checker;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  dual_rail_t [3:0] p4;
  dual_rail_t [6:0] p7;
  dual_rail_t z4, z7;

  two_rail_checker            dut4 (.pairs(p4), .z(z4));
  two_rail_checker #(.N(7))   dut7 (.pairs(p7), .z(z7));

  function automatic bit all_code(logic [13:0] v, int n);
    for (int i = 0; i < n; i++) if (v[2*i+1] == v[2*i]) return 0;
    return 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      p4 = 8'(i);
      #1;
      checks++;
      if ((z4.z1 != z4.z0) != all_code(14'(p4), 4)) begin
        failures++;
        $display("FAIL N=4 pairs=%b z=%b", p4, z4);
      end
    end
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 7; i++) begin
        p7[i].z1 = 1'($urandom);
        p7[i].z0 = ~p7[i].z1;
      end
      if (t % 2 == 1) begin
        int k;
        k = $urandom_range(6);
        p7[k].z0 = p7[k].z1;
      end
      #1;
      checks++;
      if ((z7.z1 != z7.z0) != all_code(14'(p7), 7)) begin
        failures++;
        $display("FAIL N=7 pairs=%b z=%b", p7, z7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
