// tb_ppgc: exhaustive self-check of the partial product generator (N = 4).
//
// For all 256 operand pairs it checks each partial product against the
// bit (x >> i) & (y >> j) & 1, each Q garbage output against x[i]^y[j], and
// that each row's y line leaves the row unchanged. A second instance at
// N = 6 is driven with 500 random operand pairs to check the parameterized
// structure at another size.
module tb_ppgc;

  localparam int unsigned N = 4;

  logic [N-1:0]     x, y;
  logic [N*N-1:0]   pp;
  logic [N*N+N-1:0] garbage;
  int checks = 0;
  int failures = 0;

  ppgc #(.N(N)) dut (.x(x), .y(y), .pp(pp), .garbage(garbage));

  localparam int unsigned N6 = 6;
  logic [N6-1:0]       x6, y6;
  logic [N6*N6-1:0]    pp6;
  logic [N6*N6+N6-1:0] garbage6;

  ppgc #(.N(N6)) dut6 (.x(x6), .y(y6), .pp(pp6), .garbage(garbage6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vx = 0; vx < 16; vx++) begin
      for (int vy = 0; vy < 16; vy++) begin
        x = N'(vx);
        y = N'(vy);
        #1;
        for (int j = 0; j < N; j++) begin
          for (int i = 0; i < N; i++) begin
            checks++;
            if (pp[j*N+i] !== 1'(((vx >> i) & (vy >> j)) & 1)) begin
              failures++;
              $display("FAIL pp x=%0d y=%0d i=%0d j=%0d", vx, vy, i, j);
            end
            checks++;
            if (garbage[j*N+i] !== 1'(((vx >> i) ^ (vy >> j)) & 1)) begin
              failures++;
              $display("FAIL q x=%0d y=%0d i=%0d j=%0d", vx, vy, i, j);
            end
          end
          checks++;
          if (garbage[N*N+j] !== 1'((vy >> j) & 1)) begin
            failures++;
            $display("FAIL row line x=%0d y=%0d j=%0d", vx, vy, j);
          end
        end
      end
    end
    for (int t = 0; t < 500; t++) begin
      int vx, vy;
      vx = int'($urandom_range(63));
      vy = int'($urandom_range(63));
      x6 = N6'(vx);
      y6 = N6'(vy);
      #1;
      for (int j = 0; j < N6; j++) begin
        for (int i = 0; i < N6; i++) begin
          checks++;
          if (pp6[j*N6+i] !== 1'(((vx >> i) & (vy >> j)) & 1) ||
              garbage6[j*N6+i] !== 1'(((vx >> i) ^ (vy >> j)) & 1)) begin
            failures++;
            $display("FAIL N=6 x=%0d y=%0d i=%0d j=%0d", vx, vy, i, j);
          end
        end
        checks++;
        if (garbage6[N6*N6+j] !== 1'((vy >> j) & 1)) begin
          failures++;
          $display("FAIL N=6 row line x=%0d y=%0d j=%0d", vx, vy, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
