// tb_full_adder: exhaustive self-checking test of the full adder.
//
// Applies the eight input combinations and compares {co, s} with a + b + ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_sum;
      {ci, b, a} = v[2:0];
      #1;
      exp_sum = {1'b0, a} + {1'b0, b} + {1'b0, ci};
      checks++;
      if ({co, s} !== exp_sum) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b: got co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
