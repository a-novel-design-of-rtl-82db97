// rev_mult4x4: reversible 4x4 multiplier, built only from Peres-type gates.
//
// Two stages, both combinational:
//   ppgc - 16 Peres gates, each with a constant 0 input, make the 16
//          partial products x[i]&y[j] without any copying gates;
//   rpa  - a carry-save tree and a ripple carry-propagate adder made of
//          8 Peres full adder gates (PFAG) and 4 Peres half adders sum the
//          four shifted rows into the 8-bit product.
// The whole circuit is 28 gates with 28 constant-0 inputs; with the usual
// costs (Peres gate 4, PFAG 6) its quantum cost is 16*4 + 8*6 + 4*4 = 128,
// and its longest gate path has depth 24.
//
// Interface: prod = x * y (unsigned). garbage carries every gate output
// that is neither a product bit nor consumed by another gate:
// garbage[19:0] from the ppgc, garbage[39:20] from the rpa (see those
// modules for the order). No clock, no reset: the product is valid one
// combinational settling time after x and y change.
//
// Structure and gate counts follow the design. Counting the ppgc's
// unused Q outputs and row-end lines, this build has 40 garbage outputs;
// which outputs count as garbage depends on the ppgc wiring, which is this
// implementation's choice (see ppgc).
module rev_mult4x4
  import rev_pkg::*;
(
  input  logic [N-1:0]                  x,
  input  logic [N-1:0]                  y,
  output logic [PROD_W-1:0]             prod,
  output logic [PPGC_GB_W+RPA_GB_W-1:0] garbage
);

  logic [PP_W-1:0] pp;

  ppgc #(.N(N)) u_ppgc (
    .x      (x),
    .y      (y),
    .pp     (pp),
    .garbage(garbage[PPGC_GB_W-1:0])
  );

  rpa u_rpa (
    .pp     (pp),
    .prod   (prod),
    .garbage(garbage[PPGC_GB_W+RPA_GB_W-1:PPGC_GB_W])
  );

endmodule
