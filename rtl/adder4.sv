// adder4: a 4-bit adder whose architecture is chosen by a parameter.
//
// KIND selects one of rca4, cla4, ksa4, lfa4, hca4 or bsa4; all six have the
// same interface and compute {co, s} = a + b + ci. Only the chosen one is
// elaborated, so the parameter changes structure and delay, never the result.
// Interface: a, b (4 bits), ci -> s (4 bits), co. Combinational.
// The six adder types are the ones the carry increment adder is built from;
// the selector wrapper is this design's own.
module adder4
  import cia_pkg::*;
#(
  parameter adder_kind_e KIND = ADD_HCA
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);
  if (KIND == ADD_RCA) begin : g_rca
    rca4 u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end else if (KIND == ADD_CLA) begin : g_cla
    cla4 u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end else if (KIND == ADD_KSA) begin : g_ksa
    ksa4 u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end else if (KIND == ADD_LFA) begin : g_lfa
    lfa4 u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end else if (KIND == ADD_BSA) begin : g_bsa
    bsa4 u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end else begin : g_hca
    hca4 u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end
endmodule
