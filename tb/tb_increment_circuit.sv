// tb_increment_circuit: exhaustive self-checking test of the increment
// circuit.
//
// Applies all 32 combinations of x and ci and compares {co, y} with x + ci.
// Counts the vectors where the carry ripples through all four half adders
// (x = 4'hF, ci = 1) and fails if that never happens.
module tb_increment_circuit;
  logic [3:0] x, y;
  logic       ci, co;
  int checks = 0, failures = 0, n_ripple = 0;

  increment_circuit dut (.x(x), .ci(ci), .y(y), .co(co));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [4:0] exp_sum;
      {ci, x} = v[4:0];
      #1;
      exp_sum = {1'b0, x} + {4'b0, ci};
      checks++;
      if ({co, y} !== exp_sum) begin
        failures++;
        $display("FAIL x=%h ci=%b: got co=%b y=%h", x, ci, co, y);
      end
      if (exp_sum[4]) n_ripple++;
    end
    checks++;
    if (n_ripple == 0) begin
      failures++;
      $display("FAIL coverage: carry never rippled through the chain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
