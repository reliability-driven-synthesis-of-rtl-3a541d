// ones_counter: counts the ones in an N-bit word with full and half adders.
//
// Recursive construction for K = ceil(log2(N+1)) result bits. With
// M = 2^(K-1) - 1, bit 0 is kept aside as a carry-in, bits 1..M are counted by
// one smaller counter (K-1 result bits) and the remaining N-1-M bits by
// another. A ripple adder of K-1 cells then adds the two partial counts with
// bit 0 as its carry-in; its carry-out is the top bit of the count. Where the
// second partial count is narrower (or absent) the adder cell is a half adder.
// For N = 2^K - 1 (a "maximal length" word) the whole counter is made of full
// adders only, e.g. four full adders for N = 7. Purely combinational.
//
// Linting this module on its own with Verilator reports ca and cbn as
// undriven: they are driven by the output ports of the recursive instances,
// which the linter does not follow when the module is its own top. The
// exhaustive simulation of berger_generator covers every width used.
module ones_counter #(
  parameter int unsigned N = 7,
  localparam int unsigned K = (N < 2) ? 1 : $clog2(N + 1)
) (
  input  logic [N-1:0] x,
  output logic [K-1:0] cnt
);

  if (N == 1) begin : g_one
    assign cnt = x;
  end else begin : g_rec
    localparam int unsigned M  = (1 << (K - 1)) - 1;   // bits in the first group
    localparam int unsigned B  = N - 1 - M;            // bits in the second group
    localparam int unsigned KA = K - 1;
    localparam int unsigned KB = (B == 0) ? 0 : ((B < 2) ? 1 : $clog2(B + 1));

    logic [KA-1:0] ca;
    logic [KA-1:0] cb;          // second count, zero-extended (unused bits tied low)
    logic [K-1:0]  c;           // ripple carries, c[0] = bit 0 of x
    logic [KA-1:0] s;

    ones_counter #(.N(M)) u_a (.x(x[M:1]), .cnt(ca));

    if (B > 0) begin : g_b
      logic [KB-1:0] cbn;
      ones_counter #(.N(B)) u_b (.x(x[N-1:M+1]), .cnt(cbn));
      if (KB < KA) begin : g_ext
        assign cb = {{(KA - KB){1'b0}}, cbn};
      end else begin : g_same
        assign cb = cbn;
      end
    end else begin : g_nob
      assign cb = '0;
    end

    assign c[0] = x[0];
    for (genvar i = 0; i < KA; i++) begin : g_add
      if (i < KB) begin : g_fa
        full_adder u_fa (.a(ca[i]), .b(cb[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
      end else begin : g_ha
        half_adder u_ha (.a(ca[i]), .b(c[i]), .s(s[i]), .co(c[i+1]));
      end
    end

    assign cnt = {c[K-1], s};
  end

endmodule
