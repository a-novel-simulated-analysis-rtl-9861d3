// tb_enhanced_cia8: end-to-end test of the 8-bit carry increment adder in
// every combination of upper and lower 4-bit adder.
//
// Builds all 36 combinations of the six adder kinds (upper x lower) side by
// side, drives them all with the same operands and walks through every one
// of the 2^17 values of {cin, b, a}. Each instance's {cout, s} is compared
// with a + b + cin computed here as an integer.
//
// It also counts how often each mechanism of the adder is used and fails if
// one never is: a carry in, a lower-group carry co1 fed to the increment
// circuit, that carry rippling through all four half adders to cout, and a
// carry out of the upper 4-bit adder. In the Han-Carlson/Han-Carlson
// instance it checks that the two carries into the final OR are never both
// set. Each vector is given 1 ns to settle.
module tb_enhanced_cia8;
  import cia_pkg::*;

  localparam int NK = 6;

  logic [7:0] a, b;
  logic       cin;
  logic [7:0] s    [NK][NK];
  logic       cout [NK][NK];

  int checks = 0, failures = 0;
  int n_cin = 0, n_inc = 0, n_ripple = 0, n_con = 0;

  for (genvar u = 0; u < NK; u++) begin : g_up
    for (genvar l = 0; l < NK; l++) begin : g_lo
      enhanced_cia8 #(
        .UPPER_ADDER(adder_kind_e'(u)),
        .LOWER_ADDER(adder_kind_e'(l))
      ) u_dut (
        .a(a), .b(b), .cin(cin), .s(s[u][l]), .cout(cout[u][l])
      );
    end
  end

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string kind_name(int k);
    adder_kind_e e = adder_kind_e'(k);
    return e.name();
  endfunction

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      int exp_sum, lo_sum, hi_sum;
      {cin, b, a} = v[16:0];
      #1;
      exp_sum = int'(a) + int'(b) + int'(cin);
      lo_sum  = int'(a[3:0]) + int'(b[3:0]) + int'(cin);
      hi_sum  = int'(a[7:4]) + int'(b[7:4]);
      if (cin)       n_cin++;
      if (lo_sum[4]) n_inc++;
      if (lo_sum[4] && hi_sum[3:0] == 4'hF) n_ripple++;
      if (hi_sum[4]) n_con++;

      for (int u = 0; u < NK; u++) begin
        for (int l = 0; l < NK; l++) begin
          checks++;
          if ({cout[u][l], s[u][l]} !== exp_sum[8:0]) begin
            failures++;
            if (failures <= 10)
              $display("FAIL %s-%s a=%h b=%h cin=%b: got %h, expected %h",
                       kind_name(u), kind_name(l), a, b, cin,
                       {cout[u][l], s[u][l]}, exp_sum[8:0]);
          end
        end
      end

      checks++;
      if (g_up[4].g_lo[4].u_dut.con && g_up[4].g_lo[4].u_dut.cinc) begin
        failures++;
        $display("FAIL both carries into the OR set, a=%h b=%h cin=%b", a, b, cin);
      end
    end

    $display("mechanisms: carry in %0d, co1 into increment %0d, increment ripple to cout %0d, upper carry out %0d",
             n_cin, n_inc, n_ripple, n_con);
    checks++;
    if (n_cin == 0 || n_inc == 0 || n_ripple == 0 || n_con == 0) begin
      failures++;
      $display("FAIL coverage: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
