// hca4: 4-bit Han-Carlson parallel prefix adder.
//
// Pre-processing gives each bit a (g, p) pair, g = a AND b, p = a XOR b, with
// the carry in folded into bit 0 as g0 | (p0 & ci). The prefix tree works on
// the odd columns first and fixes up the even ones in one extra level:
//   level 1: 1:0 and 3:2   (Brent-Kung style pairing)
//   level 2: 3:0           (Kogge-Stone step among the odd columns)
//   level 3: 2:0           (extra level that finishes the even column)
// This spends one more level than Kogge-Stone for fewer cells and shorter
// wires. Column i then holds G[i:0], the carry into bit i+1;
// s_i = p_i XOR c_i with c_0 = ci.
// Interface: a, b (4 bits), ci -> s (4 bits), co. Combinational.
// Three node levels follow the 4-bit Han-Carlson network; the exact node
// placement for 4 bits and folding the carry in into bit 0 are this
// design's choices.
module hca4
  import cia_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);
  logic [3:0] p;
  pg_t  [3:0] x0, x1, x2, x3;
  logic [3:0] c;

  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i < 4; i++) x0[i] = '{g: a[i] & b[i], p: p[i]};
    x0[0].g = (a[0] & b[0]) | (p[0] & ci);

    // Level 1: odd columns absorb their even neighbour.
    x1    = x0;
    x1[1] = pg_combine(x0[1], x0[0]);
    x1[3] = pg_combine(x0[3], x0[2]);

    // Level 2: Kogge-Stone step among the odd columns.
    x2    = x1;
    x2[3] = pg_combine(x1[3], x1[1]);

    // Level 3: even columns take the finished odd column below them.
    x3    = x2;
    x3[2] = pg_combine(x2[2], x2[1]);
  end

  assign c  = {x3[2].g, x3[1].g, x3[0].g, ci};
  assign s  = p ^ c;
  assign co = x3[3].g;
endmodule
