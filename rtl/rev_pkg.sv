// rev_pkg: constants shared by the reversible 4x4 multiplier.
//
// Holds the operand width, the derived bus widths, and the cost figures
// (quantum cost, depth, garbage) of the two gate types the design is made
// of. The cost figures describe the gates as quantum circuits; the RTL does
// not use them for logic; the tallies below summarise the built structure
// (28 gates, quantum cost 128, depth 24, 28 constant inputs).
package rev_pkg;

  // Operand width of the multiplier.
  localparam int unsigned N = 4;
  // Partial products, product and garbage widths.
  localparam int unsigned PP_W       = N * N;       // 16
  localparam int unsigned PROD_W     = 2 * N;       // 8
  localparam int unsigned PPGC_GB_W  = N * N + N;   // Q of each PG + row y lines
  localparam int unsigned RPA_N_FA   = 8;           // PFAG full adders in the RPA
  localparam int unsigned RPA_N_HA   = 4;           // Peres half adders in the RPA
  localparam int unsigned RPA_GB_W   = 2 * RPA_N_FA + RPA_N_HA;  // 20

  // Quantum cost and depth of a Peres gate (PG) and of the Peres full adder
  // gate (PFAG).
  localparam int unsigned QC_PG      = 4;
  localparam int unsigned DEPTH_PG   = 2;
  localparam int unsigned QC_PFAG    = 6;
  localparam int unsigned DEPTH_PFAG = 4;

  // Tallies of the complete 4x4 multiplier: the ppgc has one Peres gate per
  // partial product, the rpa RPA_N_FA PFAGs and RPA_N_HA Peres half adders,
  // and every gate has exactly one constant-0 input.
  localparam int unsigned MULT_NUM_PG    = PP_W + RPA_N_HA;                 // 20
  localparam int unsigned MULT_NUM_PFAG  = RPA_N_FA;                        // 8
  localparam int unsigned MULT_NUM_GATES = MULT_NUM_PG + MULT_NUM_PFAG;     // 28
  localparam int unsigned MULT_CONST_IN  = MULT_NUM_GATES;                  // 28
  localparam int unsigned MULT_QC        = MULT_NUM_PG * QC_PG
                                         + MULT_NUM_PFAG * QC_PFAG;         // 128
  // Longest path: ppgc Peres gate, two carry-save PFAG levels, the CPA half
  // adder, then three rippling CPA PFAGs.
  localparam int unsigned MULT_DEPTH     = 2 * DEPTH_PG + 5 * DEPTH_PFAG;   // 24

endpackage
