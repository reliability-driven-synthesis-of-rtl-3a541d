// tsc_pkg: types and size helpers shared by the self-checking checkers.
//
// Every checker in this design reports its verdict on a dual-rail pair
// (z1, z0). The pair is a code word when exactly one rail is high (10 or 01)
// and signals an error when both rails are equal (00 or 11). Keeping the
// verdict in two rails, instead of collapsing it to one "error" bit, is what
// lets a checker also reveal a stuck-at fault inside itself: a stuck rail
// turns a code word into a non-code word for some normal input.
package tsc_pkg;

  // One dual-rail signal. Valid (no error) when z1 != z0.
  typedef struct packed {
    logic z1;
    logic z0;
  } dual_rail_t;

  // True when a pair carries a code word (01 or 10).
  function automatic logic is_code(dual_rail_t p);
    return p.z1 ^ p.z0;
  endfunction

  // Number of Berger check bits for an information word of i bits:
  // enough bits to hold a count from 0 to i.
  function automatic int unsigned berger_bits(int unsigned i);
    return (i < 1) ? 1 : $clog2(i + 1);
  endfunction

endpackage
