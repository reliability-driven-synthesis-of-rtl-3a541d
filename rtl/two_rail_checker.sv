// two_rail_checker: totally self-checking checker for N dual-rail pairs.
//
// Reduces N pairs to one pair with a binary tree of N-1 two_rail_cell
// checkers. The tree is laid out like a heap: node i (0 .. 2N-2) is the pair
// computed from nodes 2i+1 and 2i+2; nodes N-1 .. 2N-2 are the input pairs and
// node 0 is the result. Every internal node thus has exactly two children,
// whatever N is. The output is a code word (01 or 10) exactly when every input
// pair is one. About ceil(log2 N) cell delays, no clock.
module two_rail_checker
  import tsc_pkg::*;
#(
  parameter int unsigned N = 4      // number of dual-rail pairs checked
) (
  input  dual_rail_t [N-1:0] pairs,
  output dual_rail_t         z
);

  dual_rail_t node [2*N-1];

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign node[N-1+i] = pairs[i];
  end

  for (genvar i = 0; i + 1 < N; i++) begin : g_cell
    two_rail_cell u_cell (.a(node[2*i+1]), .b(node[2*i+2]), .z(node[i]));
  end

  assign z = node[0];

endmodule
