// rca4: 4-bit ripple carry adder.
//
// Four full adders in a chain: the carry out of stage i is the carry in of
// stage i+1 (c0 = ci, c4 = co), so the worst-case delay grows with one full
// adder per bit. Interface: a, b (4 bits), ci -> s (4 bits), co.
// Purely combinational. The structure follows the classic ripple chain.
module rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);
  logic [4:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < 4; i++) begin : g_stage
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[4];
endmodule
