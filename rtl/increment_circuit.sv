// increment_circuit: adds a single carry bit to a 4-bit value.
//
// Four half adders in a chain: HA1 adds the incoming carry ci to x[0], and
// each following half adder adds the carry of the one before to the next
// bit. y = x + ci (mod 16); co is the carry out of the last half adder, set
// only when x = 4'b1111 and ci = 1.
// In the carry increment adder x is the upper 4-bit sum, computed with a
// carry in of 0, and ci is the carry out of the lower 4-bit adder.
// Interface: x (4 bits), ci -> y (4 bits), co. Combinational.
module increment_circuit (
  input  logic [3:0] x,
  input  logic       ci,
  output logic [3:0] y,
  output logic       co
);
  logic [4:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < 4; i++) begin : g_ha
    half_adder u_ha (
      .a(x[i]),
      .b(c[i]),
      .s(y[i]),
      .c(c[i+1])
    );
  end

  assign co = c[4];
endmodule
