// two_rail_cell: totally self-checking checker for two dual-rail pairs.
//
// Inputs a = (a1, a0) and b = (b1, b0) are each expected to be complementary.
// The output pair is
//     z1 = a1 b1 + a0 b0
//     z0 = a1 b0 + a0 b1
// which is complementary exactly when both input pairs are. A non-code input
// on either pair gives a non-code output, and every stuck-at fault on one of
// the eight product or sum lines turns some pair of code inputs into a
// non-code output, so the cell also reveals faults in itself. This is the
// classic two-rail checker cell that the method uses as the building block of
// wider checkers; it is purely combinational.
module two_rail_cell
  import tsc_pkg::*;
(
  input  dual_rail_t a,
  input  dual_rail_t b,
  output dual_rail_t z
);

  assign z.z1 = (a.z1 & b.z1) | (a.z0 & b.z0);
  assign z.z0 = (a.z1 & b.z0) | (a.z0 & b.z1);

endmodule
