// tsc_eq_comparator: totally self-checking equality comparator.
//
// Compares two N-bit vectors x and y and reports the result on one
// dual-rail pair: 01 or 10 when x == y, 00 or 11 when they differ. Bit i
// forms the pair (x[i], ~y[i]), which is complementary exactly when
// x[i] == y[i]; all pairs go to a two_rail_checker tree. Because the verdict
// stays dual-rail, a stuck-at fault inside the comparator also shows as a
// non-code output for some equal inputs. Used to compare the outputs of the
// two copies in the duplication scheme and the predicted with the recomputed
// Berger check bits in the coding scheme. Purely combinational.
module tsc_eq_comparator
  import tsc_pkg::*;
#(
  parameter int unsigned N = 8      // width of the compared vectors
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output dual_rail_t   z
);

  dual_rail_t [N-1:0] pairs;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pairs[i].z1 = x[i];
      pairs[i].z0 = ~y[i];
    end
  end

  two_rail_checker #(.N(N)) u_tree (.pairs(pairs), .z(z));

endmodule
