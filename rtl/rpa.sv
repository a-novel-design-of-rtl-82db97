// rpa: Reversible Parallel Adder of the 4x4 multiplier.
//
// Adds the four shifted partial-product rows of a 4x4 multiplication.
// A carry-save tree first reduces the column heights (1,2,3,4,3,2,1 for
// weights 2^0..2^6) to two bits per column; a ripple carry-propagate adder
// (CPA) over weights 2^3..2^6 then finishes the sum, its carry-out being
// product bit 7. Full adders are PFAG gates with D = 0 (R = sum,
// S = carry); half adders are Peres gates with C = 0 (Q = sum, R = carry).
//
// Cells, by column (pp_ij = x[i]&y[j] = pp[j*4+i]):
//   w1: ha1 (pp_10, pp_01)            -> prod[1]
//   w2: fa2 (pp_20, pp_11, pp_02);  ha2 (fa2.sum, ha1.carry) -> prod[2]
//   w3: fa3a(pp_30, pp_21, pp_12);  fa3b(pp_03, fa3a.sum, fa2.carry)
//       CPA ha3 (fa3b.sum, ha2.carry) -> prod[3]
//   w4: fa4 (pp_31, pp_22, pp_13);  ha4 (fa4.sum, fa3a.carry)
//       CPA cpa4(ha4.sum, fa3b.carry, ha3.carry) -> prod[4]
//   w5: fa5 (pp_32, pp_23, fa4.carry)
//       CPA cpa5(fa5.sum, ha4.carry, cpa4.carry) -> prod[5]
//   w6: CPA cpa6(pp_33, fa5.carry, cpa5.carry) -> prod[6], carry -> prod[7]
// That is 8 PFAGs and 4 Peres half adders. Counting Peres depth 2 and
// PFAG depth 4, the longest path is PG(ppgc) -> fa3a -> fa3b -> ha3 ->
// cpa4 -> cpa5 -> cpa6 = 2+4+4+2+4+4+4 = 24.
// The gate counts, the gate types, the two-stage CSA-then-CPA structure
// and the depth follow the design; the placement of each cell above is
// this implementation's own arrangement meeting those numbers.
//
// Interface: pp in, prod = sum of the rows out, garbage = P and Q of each
// PFAG (order fa2, fa3a, fa3b, fa4, fa5, cpa4, cpa5, cpa6) then P of each
// half adder (ha1, ha2, ha3, ha4). Purely combinational.
module rpa
  import rev_pkg::*;
(
  input  logic [PP_W-1:0]     pp,
  output logic [PROD_W-1:0]   prod,
  output logic [RPA_GB_W-1:0] garbage
);

  // Partial product x[i]&y[j], weight 2^(i+j).
  function automatic int unsigned idx(int unsigned i, int unsigned j);
    return j * N + i;
  endfunction

  // Carry-save tree signals.
  logic ha1_c, ha2_c, ha4_s, ha4_c;
  logic fa2_s, fa2_c, fa3a_s, fa3a_c, fa3b_s, fa3b_c;
  logic fa4_s, fa4_c, fa5_s, fa5_c;
  // Carry-propagate adder ripple carries.
  logic ha3_c, cpa4_c, cpa5_c;

  // Weight 2^0: a single partial product.
  assign prod[0] = pp[idx(0, 0)];

  // Weight 2^1.
  peres_gate u_ha1 (.a(pp[idx(1, 0)]), .b(pp[idx(0, 1)]), .c(1'b0),
                    .p(garbage[16]), .q(prod[1]), .r(ha1_c));

  // Weight 2^2.
  pfag u_fa2 (.a(pp[idx(2, 0)]), .b(pp[idx(1, 1)]), .c(pp[idx(0, 2)]), .d(1'b0),
              .p(garbage[0]), .q(garbage[1]), .r(fa2_s), .s(fa2_c));
  peres_gate u_ha2 (.a(fa2_s), .b(ha1_c), .c(1'b0),
                    .p(garbage[17]), .q(prod[2]), .r(ha2_c));

  // Weight 2^3.
  pfag u_fa3a (.a(pp[idx(3, 0)]), .b(pp[idx(2, 1)]), .c(pp[idx(1, 2)]), .d(1'b0),
               .p(garbage[2]), .q(garbage[3]), .r(fa3a_s), .s(fa3a_c));
  pfag u_fa3b (.a(pp[idx(0, 3)]), .b(fa3a_s), .c(fa2_c), .d(1'b0),
               .p(garbage[4]), .q(garbage[5]), .r(fa3b_s), .s(fa3b_c));

  // Weight 2^4.
  pfag u_fa4 (.a(pp[idx(3, 1)]), .b(pp[idx(2, 2)]), .c(pp[idx(1, 3)]), .d(1'b0),
              .p(garbage[6]), .q(garbage[7]), .r(fa4_s), .s(fa4_c));
  peres_gate u_ha4 (.a(fa4_s), .b(fa3a_c), .c(1'b0),
                    .p(garbage[19]), .q(ha4_s), .r(ha4_c));

  // Weight 2^5.
  pfag u_fa5 (.a(pp[idx(3, 2)]), .b(pp[idx(2, 3)]), .c(fa4_c), .d(1'b0),
              .p(garbage[8]), .q(garbage[9]), .r(fa5_s), .s(fa5_c));

  // Carry-propagate adder over weights 2^3..2^6.
  peres_gate u_ha3 (.a(fa3b_s), .b(ha2_c), .c(1'b0),
                    .p(garbage[18]), .q(prod[3]), .r(ha3_c));
  pfag u_cpa4 (.a(ha4_s), .b(fa3b_c), .c(ha3_c), .d(1'b0),
               .p(garbage[10]), .q(garbage[11]), .r(prod[4]), .s(cpa4_c));
  pfag u_cpa5 (.a(fa5_s), .b(ha4_c), .c(cpa4_c), .d(1'b0),
               .p(garbage[12]), .q(garbage[13]), .r(prod[5]), .s(cpa5_c));
  pfag u_cpa6 (.a(pp[idx(3, 3)]), .b(fa5_c), .c(cpa5_c), .d(1'b0),
               .p(garbage[14]), .q(garbage[15]), .r(prod[6]), .s(prod[7]));

endmodule
