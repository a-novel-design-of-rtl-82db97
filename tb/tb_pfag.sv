// tb_pfag: exhaustive self-check of the Peres full adder gate.
//
// For all 16 inputs it checks P = A, Q = A^B, and, from the integer sum
// A+B+C, that R is the sum bit and S the carry bit XOR D. It also checks
// that the 16 output patterns are distinct (the gate is reversible).
module tb_pfag;

  logic a, b, c, d, p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  bit   seen [16];

  pfag dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int sum3;
      {a, b, c, d} = 4'(v);
      sum3 = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if (p !== a || q !== (a != b) || r !== 1'(sum3 % 2) || s !== (1'(sum3 / 2) ^ d)) begin
        failures++;
        $display("FAIL in=%b%b%b%b out=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated: gate not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
