// bsa4: 4-bit Beaumont-Smith parallel prefix adder.
//
// Beaumont-Smith trees use higher-valency prefix cells: one cell merges up to
// four (g, p) groups at once. For 4 bits that leaves a single prefix level of
// three cells: column 1 merges bits 1..0, column 2 merges bits 2..0 and
// column 3 merges bits 3..0, each directly from the bit-level pairs
// (g = a AND b, p = a XOR b, with the carry in folded into bit 0 as
// g0 | (p0 & ci)). Column i then holds G[i:0], the carry into bit i+1;
// s_i = p_i XOR c_i with c_0 = ci.
// Interface: a, b (4 bits), ci -> s (4 bits), co. Combinational.
// The single level of 2-, 3- and 4-input cells is the network drawn for 4
// bits; folding the carry in into bit 0 is this design's choice.
module bsa4
  import cia_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);
  logic [3:0] p, g;
  logic [3:0] gg;  // group generate G[i:0]
  logic [3:0] c;

  assign p = a ^ b;

  always_comb begin
    g    = a & b;
    g[0] = (a[0] & b[0]) | (p[0] & ci);
    // One level of valency-2, -3 and -4 cells.
    gg[0] = g[0];
    gg[1] = g[1] | (p[1] & g[0]);
    gg[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]);
    gg[3] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end

  assign c  = {gg[2:0], ci};
  assign s  = p ^ c;
  assign co = gg[3];
endmodule
