// tb_rpa: exhaustive self-check of the reversible parallel adder.
//
// Drives all 2^16 partial-product patterns (not only those a real
// multiplication produces) and checks that prod equals the weighted sum of
// the bits, sum over i,j of pp[j*4+i] * 2^(i+j), which is at most 225 and
// so always fits in 8 bits. Also checks that every PFAG's P garbage output
// equals the A input it was given for a few cells fed straight from pp.
module tb_rpa;

  import rev_pkg::*;

  logic [PP_W-1:0]     pp;
  logic [PROD_W-1:0]   prod;
  logic [RPA_GB_W-1:0] garbage;
  int checks = 0;
  int failures = 0;

  rpa dut (.pp(pp), .prod(prod), .garbage(garbage));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << PP_W); v++) begin
      int expected;
      pp = PP_W'(v);
      expected = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++)
          if (((v >> (j*4 + i)) & 1) != 0) expected += 1 << (i + j);
      #1;
      checks++;
      if (int'(prod) != expected) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h prod=%0d expected=%0d", pp, prod, expected);
      end
      // P outputs of fa2, fa3a and fa4 are x2y0, x3y0 and x3y1.
      checks++;
      if (garbage[0] !== pp[2] || garbage[2] !== pp[3] || garbage[6] !== pp[7]) begin
        failures++;
        if (failures < 10) $display("FAIL garbage pp=%h g=%h", pp, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
