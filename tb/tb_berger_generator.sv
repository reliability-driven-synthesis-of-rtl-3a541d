// tb_berger_generator: exhaustive check of the check-bit count (number of
// zeros in the information word) for the default maximal-length generator
// (I = 7, K = 3) and for I = 1, 2, 3, 10 and 15, which mix half and full
// adders differently.
module tb_berger_generator;

  int checks = 0, failures = 0;
  logic [14:0] v;
  logic [2:0] c7;
  logic [0:0] c1;
  logic [1:0] c2, c3;
  logic [3:0] c10, c15;

  berger_generator           dut7  (.info(v[6:0]), .check(c7));
  berger_generator #(.I(1))  dut1  (.info(v[0:0]), .check(c1));
  berger_generator #(.I(2))  dut2  (.info(v[1:0]), .check(c2));
  berger_generator #(.I(3))  dut3  (.info(v[2:0]), .check(c3));
  berger_generator #(.I(10)) dut10 (.info(v[9:0]), .check(c10));
  berger_generator #(.I(15)) dut15 (.info(v),      .check(c15));

  function automatic int zeros(logic [14:0] w, int n);
    int z;
    z = 0;
    for (int i = 0; i < n; i++) if (!w[i]) z++;
    return z;
  endfunction

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s v=%h got %0d want %0d", what, v, got, want);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32768; i++) begin
      v = 15'(i);
      #1;
      expect_eq(int'(c15), zeros(v, 15), "I=15");
      if (i < 1024) expect_eq(int'(c10), zeros(v, 10), "I=10");
      if (i < 128)  expect_eq(int'(c7),  zeros(v, 7),  "I=7");
      if (i < 8)    expect_eq(int'(c3),  zeros(v, 3),  "I=3");
      if (i < 4)    expect_eq(int'(c2),  zeros(v, 2),  "I=2");
      if (i < 2)    expect_eq(int'(c1),  zeros(v, 1),  "I=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
