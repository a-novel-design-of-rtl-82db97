// tb_peres_gate: exhaustive self-check of the 3x3 Peres gate.
//
// Applies all 8 input patterns, compares P, Q, R with values computed from
// integer arithmetic (Q is the low bit of A+B, R is the low bit of A*B+C),
// and checks that the 8 output patterns are all different, i.e. that the
// gate is reversible. A watchdog ends the run if it stalls.
module tb_peres_gate;

  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ia, ib, ic;
      ia = (v >> 2) & 1;
      ib = (v >> 1) & 1;
      ic = v & 1;
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== 1'(ia) || q !== 1'((ia + ib) % 2) || r !== 1'((ia * ib + ic) % 2)) begin
        failures++;
        $display("FAIL in=%b%b%b out=%b%b%b", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated: gate not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
