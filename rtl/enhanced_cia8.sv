// enhanced_cia8: 8-bit carry increment adder built from two 4-bit adders.
//
// The operands are split into two 4-bit groups that are added at the same
// time. The lower adder adds a[3:0] + b[3:0] + cin and delivers s[3:0] and
// its carry co1. The upper adder adds a[7:4] + b[7:4] with a carry in of 0,
// so it need not wait for co1; its sum t and carry con are ready in the time
// of one 4-bit addition. An increment circuit (four half adders) then adds
// co1 to t to give s[7:4]. At most one of con and the increment circuit's
// carry can be 1 (t = 4'b1111 implies con = 0), so cout is their OR.
//
// UPPER_ADDER and LOWER_ADDER choose the architecture of each 4-bit adder:
// ripple carry, carry look-ahead, Kogge-Stone, Ladner-Fischer, Han-Carlson
// or Beaumont-Smith, in any combination. A combination is named
// UPPER-LOWER, e.g. HCA-RCA is a Han-Carlson upper and a ripple carry lower
// adder. The default, Han-Carlson in both halves, is the combination with
// the shortest delay. RCA-RCA is the basic carry increment adder.
//
// Interface: a, b (8 bits), cin -> s (8 bits), cout, {cout, s} = a + b + cin.
// Purely combinational; no clock or reset.
module enhanced_cia8
  import cia_pkg::*;
#(
  parameter adder_kind_e UPPER_ADDER = ADD_HCA,
  parameter adder_kind_e LOWER_ADDER = ADD_HCA
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);
  logic       co1;   // carry out of the lower adder
  logic [3:0] t;     // upper sum, computed with carry in 0
  logic       con;   // carry out of the upper adder
  logic       cinc;  // carry out of the increment circuit

  adder4 #(.KIND(LOWER_ADDER)) u_lower (
    .a (a[3:0]),
    .b (b[3:0]),
    .ci(cin),
    .s (s[3:0]),
    .co(co1)
  );

  adder4 #(.KIND(UPPER_ADDER)) u_upper (
    .a (a[7:4]),
    .b (b[7:4]),
    .ci(1'b0),
    .s (t),
    .co(con)
  );

  increment_circuit u_inc (
    .x (t),
    .ci(co1),
    .y (s[7:4]),
    .co(cinc)
  );

  assign cout = con | cinc;
endmodule
