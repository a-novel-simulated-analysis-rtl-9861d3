// tb_ksa4: exhaustive self-checking test of the 4-bit Kogge-Stone adder.
//
// Applies all 512 combinations of a, b and ci and compares {co, s} with the
// sum a + b + ci computed here as an integer. Also counts how many vectors
// produce a carry out and how many propagate a carry in through all four
// bits (a ^ b = 4'hF, ci = 1), and fails if either never occurs.
// The adder is combinational: each vector is given 1 ns to settle.
module tb_ksa4;
  logic [3:0] a, b, s;
  logic       ci, co;
  int checks = 0, failures = 0;
  int n_cout = 0, n_full_prop = 0;

  ksa4 dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int exp_sum;
      {ci, b, a} = v[8:0];
      #1;
      exp_sum = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== exp_sum[4:0]) begin
        failures++;
        if (failures <= 10)
          $display("FAIL a=%h b=%h ci=%b: got co=%b s=%h, expected %h",
                   a, b, ci, co, s, exp_sum[4:0]);
      end
      if (exp_sum[4]) n_cout++;
      if ((a ^ b) == 4'hF && ci) n_full_prop++;
    end
    checks++;
    if (n_cout == 0 || n_full_prop == 0) begin
      failures++;
      $display("FAIL coverage: carry out %0d, full propagation %0d", n_cout, n_full_prop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
