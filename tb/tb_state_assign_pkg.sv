// tb_state_assign_pkg: checks the distance-two state assignment.
//   * The codes for one to nine states against the worked example, each
//     intermediate step of which is the previous one with a 0 appended
//     whenever the width grows.
//   * For 2 to 48 states: every code has even parity, every pair of codes is
//     at distance two or more, and the width is ceil(log2 n) + 1.
module tb_state_assign_pkg;
  import state_assign_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  // Expected widths for 1..9 states.
  localparam int WIDTH9 [9] = '{1, 2, 3, 3, 4, 4, 4, 4, 5};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: code of state i among n states is the final 5-bit code
    // with its trailing (5 - width) zero bits removed.
    for (int n = 1; n <= 9; n++) begin
      int w;
      w = int'(code_width(n));
      checks++;
      if (w != WIDTH9[n-1]) begin
        failures++;
        $display("FAIL width n=%0d got %0d want %0d", n, w, WIDTH9[n-1]);
      end
      for (int i = 0; i < n; i++) begin
        logic [15:0] want;
        want = 16'(CODE9[i] >> (5 - WIDTH9[n-1]));
        checks++;
        if (state_code(n, i) != want) begin
          failures++;
          $display("FAIL code n=%0d state %0d got %b want %b", n, i, state_code(n, i), want);
        end
      end
    end
    for (int n = 2; n <= 48; n++) begin
      int w;
      w = int'(code_width(n));
      checks++;
      if (w != $clog2(n) + 1) begin
        failures++;
        $display("FAIL width n=%0d got %0d", n, w);
      end
      for (int i = 0; i < n; i++) begin
        code_t ci;
        ci = state_code(n, i);
        checks++;
        if (($countones(ci) % 2) != 0 || (ci >> w) != 0) begin
          failures++;
          $display("FAIL parity/range n=%0d state %0d code %b", n, i, ci);
        end
        for (int j = 0; j < i; j++) begin
          checks++;
          if ($countones(ci ^ state_code(n, j)) < 2) begin
            failures++;
            $display("FAIL distance n=%0d states %0d %0d", n, i, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
