// half_adder: one-bit half adder, the cell of the increment circuit.
//
// s = a XOR b, c = a AND b. Purely combinational, no clock.
// The increment circuit chains four of these; the gate equations are the
// textbook ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
