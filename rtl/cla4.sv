// cla4: 4-bit carry look-ahead adder.
//
// Each bit forms P_i = a_i XOR b_i and G_i = a_i AND b_i. A look-ahead unit
// then computes every carry directly from the P/G bits and the carry in by
// unrolling c_{i+1} = G_i OR (P_i AND c_i), so no carry waits for the one
// below it. The sums are S_i = P_i XOR c_i.
// Interface: a, b (4 bits), ci (c0) -> s (4 bits), co (c4). Combinational.
// The P/G/S/carry equations are the classic ones; the two-level (sum of
// products) form of the look-ahead unit is this design's choice.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);
  logic [3:0] p, g;
  logic [4:0] c;

  assign p = a ^ b;
  assign g = a & b;

  // Look-ahead unit: every carry as a sum of products of P, G and c0.
  assign c[0] = ci;
  assign c[1] = g[0] | (p[0] & c[0]);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c[0]);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
              | (p[2] & p[1] & p[0] & c[0]);
  assign c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
              | (p[3] & p[2] & p[1] & g[0]) | (p[3] & p[2] & p[1] & p[0] & c[0]);

  assign s  = p ^ c[3:0];
  assign co = c[4];
endmodule
