// peres_gate: the 3x3 reversible Peres gate (PG).
//
//   P = A
//   Q = A ^ B
//   R = (A & B) ^ C
//
// The mapping (A,B,C) -> (P,Q,R) is a bijection on 3 bits, so the gate loses
// no information. With C tied to 0 it yields A&B on R (an AND with its
// operands' XOR on Q); the multiplier uses it that way both as the
// partial-product cell and as a half adder (Q = sum, R = carry).
// As a quantum circuit it costs 4 elementary gates with depth 2.
// Purely combinational: no clock, no state.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule
