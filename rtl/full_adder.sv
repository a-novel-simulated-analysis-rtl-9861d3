// full_adder: one-bit full adder, the cell of the ripple carry adder.
//
// s = a XOR b XOR ci; co = majority(a, b, ci), written as
// (a AND b) OR (ci AND (a XOR b)). Purely combinational, no clock.
// The gate equations are the textbook ones.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (ci & p);
endmodule
