// tsc_parity_checker: totally self-checking even-parity checker.
//
// The state bits are split into two groups: the low W/2 bits and the rest.
//     z1 = XOR of the low group
//     z0 = XNOR of the high group
// With an even number of ones in the whole word both groups have the same
// parity, so z1 != z0 (a code word). A single flipped bit makes the parities
// differ and the pair becomes 00 or 11. Since each rail is produced by its own
// XOR tree, a stuck-at fault in either tree also yields a non-code output for
// some even-parity word. Purely combinational; W must be at least 2.
module tsc_parity_checker
  import tsc_pkg::*;
#(
  parameter int unsigned W = 5      // width of the checked word
) (
  input  logic [W-1:0] d,
  output dual_rail_t   z
);

  localparam int unsigned WL = W / 2;

  if (W < 2) begin : g_bad_width
    $error("tsc_parity_checker needs W >= 2");
  end

  assign z.z1 = ^d[WL-1:0];
  assign z.z0 = ~(^d[W-1:WL]);

endmodule
