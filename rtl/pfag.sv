// pfag: the 4x4 reversible Peres Full Adder Gate (PFAG).
//
//   P = A
//   Q = A ^ B
//   R = A ^ B ^ C
//   S = ((A ^ B) & C) ^ (A & B) ^ D
//
// It is two Peres gates in cascade. The first takes (A, B, D) and gives
// (A, A^B, AB^D); the second takes (A^B, C, AB^D) and gives
// (A^B, A^B^C, (A^B)C ^ AB ^ D). With the constant input D = 0, R is the
// full-adder sum and S the carry-out of A + B + C; P and Q are garbage.
// The whole gate is a bijection on 4 bits. Its quantum cost is 6 and its
// depth 4 in the optimized quantum realization; the gate-level structure
// here (two PGs) is the logical one. Purely combinational.
module pfag (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic axb;   // A ^ B, from the first Peres gate
  logic abd;   // (A & B) ^ D, from the first Peres gate

  peres_gate u_pg0 (
    .a(a), .b(b), .c(d),
    .p(p), .q(axb), .r(abd)
  );

  peres_gate u_pg1 (
    .a(axb), .b(c), .c(abd),
    .p(q), .q(r), .r(s)
  );

endmodule
