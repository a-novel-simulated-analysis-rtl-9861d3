// tb_enhanced_cia8_full: exhaustive test of the 8-bit carry increment adder
// in its default configuration (Han-Carlson adders in both halves).
//
// Walks through every one of the 2^17 values of {cin, b, a} and compares
// {cout, s} with a + b + cin computed here. Checks that the upper adder's
// carry and the increment circuit's carry are never both set, and counts
// the vectors where each of them drives cout; fails if either never does.
// Each vector is given 1 ns to settle.
module tb_enhanced_cia8_full;
  logic [7:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;
  int n_con = 0, n_cinc = 0;

  enhanced_cia8 u_dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      int exp_sum;
      {cin, b, a} = v[16:0];
      #1;
      exp_sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== exp_sum[8:0]) begin
        failures++;
        if (failures <= 10)
          $display("FAIL a=%h b=%h cin=%b: got %h, expected %h",
                   a, b, cin, {cout, s}, exp_sum[8:0]);
      end
      checks++;
      if (u_dut.con && u_dut.cinc) begin
        failures++;
        $display("FAIL both carries into the OR set, a=%h b=%h cin=%b", a, b, cin);
      end
      if (u_dut.con)  n_con++;
      if (u_dut.cinc) n_cinc++;
    end
    $display("cout from upper adder %0d, from increment circuit %0d", n_con, n_cinc);
    checks++;
    if (n_con == 0 || n_cinc == 0) begin
      failures++;
      $display("FAIL coverage: one source of cout never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
