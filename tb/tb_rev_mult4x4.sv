// tb_rev_mult4x4: end-to-end self-check of the reversible 4x4 multiplier.
//
// Runs every one of the 256 operand pairs through the full design at its
// default size and checks:
//   - prod against x*y computed with integer multiplication;
//   - the partial product stage's garbage (x[i]^y[j], then y[j]);
//   - that the 48 output bits (prod and garbage) are different for every
//     input pair, so the circuit with its constant inputs loses nothing;
//   - the structure tallies (28 gates, 28 constant inputs, quantum cost
//     128, depth 24).
// It also counts how often each carry mechanism of the adder fires: every
// carry-save carry, a carry rippling through the whole carry-propagate
// adder (half adder and all three PFAG cells carrying at once), and the
// final carry-out into product bit 7. A mechanism that never fires counts
// as a failure. The design is combinational, so there is no cycle count.
module tb_rev_mult4x4;

  import rev_pkg::*;

  localparam int unsigned GB_W = PPGC_GB_W + RPA_GB_W;

  logic [N-1:0]      x, y;
  logic [PROD_W-1:0] prod;
  logic [GB_W-1:0]   garbage;
  int checks = 0;
  int failures = 0;

  // Outputs seen so far, to check that no two inputs share them.
  bit seen [logic [PROD_W+GB_W-1:0]];

  // Mechanism counters.
  int n_csa_carry [8];
  int n_cpa_ripple = 0;
  int n_carry_out = 0;

  rev_mult4x4 dut (.x(x), .y(y), .prod(prod), .garbage(garbage));

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_true(MULT_NUM_GATES == 28, "gate count");
    expect_true(MULT_CONST_IN == 28, "constant input count");
    expect_true(MULT_QC == 128, "quantum cost");
    expect_true(MULT_DEPTH == 24, "depth");
    expect_true(GB_W == 40, "garbage width");

    for (int vx = 0; vx < 16; vx++) begin
      for (int vy = 0; vy < 16; vy++) begin
        x = N'(vx);
        y = N'(vy);
        #1;
        expect_true(int'(prod) == vx * vy,
                    $sformatf("prod %0d*%0d gave %0d", vx, vy, prod));
        for (int j = 0; j < 4; j++) begin
          for (int i = 0; i < 4; i++)
            expect_true(garbage[j*4+i] == 1'(((vx >> i) ^ (vy >> j)) & 1),
                        $sformatf("ppgc garbage x=%0d y=%0d i=%0d j=%0d", vx, vy, i, j));
          expect_true(garbage[16+j] == 1'((vy >> j) & 1),
                      $sformatf("ppgc row line x=%0d y=%0d j=%0d", vx, vy, j));
        end
        expect_true(!seen.exists({prod, garbage}),
                    $sformatf("outputs for x=%0d y=%0d repeat another input", vx, vy));
        seen[{prod, garbage}] = 1'b1;

        if (dut.u_rpa.ha1_c)  n_csa_carry[0]++;
        if (dut.u_rpa.ha2_c)  n_csa_carry[1]++;
        if (dut.u_rpa.ha4_c)  n_csa_carry[2]++;
        if (dut.u_rpa.fa2_c)  n_csa_carry[3]++;
        if (dut.u_rpa.fa3a_c) n_csa_carry[4]++;
        if (dut.u_rpa.fa3b_c) n_csa_carry[5]++;
        if (dut.u_rpa.fa4_c)  n_csa_carry[6]++;
        if (dut.u_rpa.fa5_c)  n_csa_carry[7]++;
        if (dut.u_rpa.ha3_c && dut.u_rpa.cpa4_c && dut.u_rpa.cpa5_c && prod[7])
          n_cpa_ripple++;
        if (prod[7]) n_carry_out++;
      end
    end

    for (int k = 0; k < 8; k++) begin
      $display("carry-save carry %0d fired %0d times", k, n_csa_carry[k]);
      expect_true(n_csa_carry[k] > 0, $sformatf("carry-save carry %0d never fired", k));
    end
    $display("full CPA ripple: %0d, carry into P7: %0d", n_cpa_ripple, n_carry_out);
    expect_true(n_cpa_ripple > 0, "carry never rippled through the whole CPA");
    expect_true(n_carry_out > 0, "carry-out never set");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
