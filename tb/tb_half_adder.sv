// tb_half_adder: exhaustive self-checking test of the half adder.
//
// Applies the four input combinations and compares {c, s} with a + b.
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] exp_sum;
      {b, a} = v[1:0];
      #1;
      exp_sum = {1'b0, a} + {1'b0, b};
      checks++;
      if ({c, s} !== exp_sum) begin
        failures++;
        $display("FAIL a=%b b=%b: got c=%b s=%b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
