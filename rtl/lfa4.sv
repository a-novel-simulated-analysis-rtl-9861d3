// lfa4: 4-bit Ladner-Fischer parallel prefix adder.
//
// Pre-processing gives each bit a (g, p) pair, g = a AND b, p = a XOR b, with
// the carry in folded into bit 0 as g0 | (p0 & ci). Two prefix levels:
//   level 1: 1:0 and 3:2 (pairs)
//   level 2: 2:0 and 3:0, both taken from the single 1:0 node
// The 1:0 node drives two cells on level 2; that is the minimum-depth
// (log2 n) tree, with fewer cells than Kogge-Stone. Column i then holds
// G[i:0], the carry into bit i+1; s_i = p_i XOR c_i with c_0 = ci.
// Interface: a, b (4 bits), ci -> s (4 bits), co. Combinational.
// The node placement is the Ladner-Fischer network drawn for 4 bits; folding
// the carry in into bit 0 is this design's choice.
module lfa4
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

    // Level 1: neighbouring pairs.
    x1[0] = x0[0];
    x1[1] = pg_combine(x0[1], x0[0]);
    x1[2] = x0[2];
    x1[3] = pg_combine(x0[3], x0[2]);

    // Level 2: the upper pair's columns both take the 1:0 group.
    x2[0] = x1[0];
    x2[1] = x1[1];
    x2[2] = pg_combine(x1[2], x1[1]);
    x2[3] = pg_combine(x1[3], x1[1]);
  end

  assign c  = {x2[2].g, x2[1].g, x2[0].g, ci};
  assign s  = p ^ c;
  assign co = x2[3].g;
endmodule
