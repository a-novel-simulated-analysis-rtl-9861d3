// ksa4: 4-bit Kogge-Stone parallel prefix adder.
//
// Pre-processing gives each bit a (g, p) pair, g = a AND b, p = a XOR b. The
// carry in is folded into bit 0 as g0 | (p0 & ci), so the prefix tree sees
// it as part of the least significant generate. Two prefix levels follow,
// every column combining with the column 1 and then 2 places below:
//   level 1: 1:0, 2:1, 3:2      level 2: 2:0 (with bit 0), 3:0 (with 1:0)
// After level 2 column i holds the group generate G[i:0], which is the carry
// into bit i+1. Sums are s_i = p_i XOR c_i with c_0 = ci; co = G[3:0].
// Interface: a, b (4 bits), ci -> s (4 bits), co. Combinational.
// The two-level tree with fan-out at most 2 is the Kogge-Stone network drawn
// for 4 bits; folding the carry in into bit 0 is this design's choice.
module ksa4
  import cia_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);
  logic [3:0] p;
  pg_t  [3:0] x0, x1, x2;
  logic [3:0] c;

  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i < 4; i++) x0[i] = '{g: a[i] & b[i], p: p[i]};
    x0[0].g = (a[0] & b[0]) | (p[0] & ci);

    // Level 1: distance 1.
    x1[0] = x0[0];
    for (int i = 1; i < 4; i++) x1[i] = pg_combine(x0[i], x0[i-1]);

    // Level 2: distance 2.
    x2[0] = x1[0];
    x2[1] = x1[1];
    for (int i = 2; i < 4; i++) x2[i] = pg_combine(x1[i], x1[i-2]);
  end

  assign c  = {x2[2].g, x2[1].g, x2[0].g, ci};
  assign s  = p ^ c;
  assign co = x2[3].g;
endmodule
