// tb_tsc_eq_comparator: drives equal vectors, vectors differing in one bit
// and random vectors into the default 8-bit comparator; the output must be a
// code word exactly when the two vectors are equal.
module tb_tsc_eq_comparator;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] x, y;
  dual_rail_t z;

  tsc_eq_comparator dut (.x(x), .y(y), .z(z));

  task automatic check();
    #1;
    checks++;
    if ((z.z1 != z.z0) != (x == y)) begin
      failures++;
      $display("FAIL x=%h y=%h z=%b", x, y, z);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 256; t++) begin
      x = 8'(t); y = x; check();
      y = x ^ (8'd1 << (t % 8)); check();
      y = 8'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
