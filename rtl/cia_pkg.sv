// cia_pkg: types and helpers shared by the carry increment adder and its
// 4-bit building blocks.
//
// adder_kind_e names the six 4-bit adder architectures that can sit in either
// half of the 8-bit carry increment adder. pg_t is a (generate, propagate)
// pair as used by the parallel prefix adders, and pg_combine() is the prefix
// "black cell": it merges a more significant group (hi) with the adjacent less
// significant group (lo) into one group spanning both.
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo
// The operator is the standard carry operator of prefix adders; the package
// and its names are this design's own.
package cia_pkg;

  typedef enum logic [2:0] {
    ADD_RCA = 3'd0,  // ripple carry
    ADD_CLA = 3'd1,  // carry look-ahead
    ADD_KSA = 3'd2,  // Kogge-Stone
    ADD_LFA = 3'd3,  // Ladner-Fischer
    ADD_HCA = 3'd4,  // Han-Carlson
    ADD_BSA = 3'd5   // Beaumont-Smith
  } adder_kind_e;

  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  function automatic pg_t pg_combine(input pg_t hi, input pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
