// ppgc: Partial Product Generation Circuit of the reversible multiplier.
//
// Produces the N*N partial products x[i]&y[j] using one Peres gate per
// product and no copying (Feynman) gates. Gate (i,j) is PG(A, B, C=0) with
//   A = the y[j] line of row j,  B = x[i],  C = constant 0,
// so R = x[i]&y[j] is the partial product and Q = x[i]^y[j] is garbage.
// Because a Peres gate passes A through unchanged (P = A), the y[j] line
// runs through the N gates of row j one after another; the line leaving
// the last gate of each row is a garbage output. Each x[i] drives the B
// input of one gate in every row.
//
// Interface: pp[j*N+i] = x[i] & y[j], which has weight 2^(i+j).
// garbage[j*N+i] = Q of gate (i,j) = x[i]^y[j]; garbage[N*N+j] = y[j]
// after row j. Purely combinational; as a quantum circuit the depth is
// that of one Peres gate per row position.
//
// The gate count (N*N Peres gates), the constant-0 inputs and the absence
// of copying gates follow the design. The exact gate-to-line wiring is
// this implementation's choice: with only Peres gates and no copying, one
// operand has to feed several gates, and here that operand is x.
module ppgc #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]       x,
  input  logic [N-1:0]       y,
  output logic [N*N-1:0]     pp,
  output logic [N*N+N-1:0]   garbage
);

  // line[j][i] is the y[j] line entering gate i of row j.
  logic [N:0] line [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    assign line[j][0] = y[j];
    for (genvar i = 0; i < N; i++) begin : g_col
      peres_gate u_pg (
        .a(line[j][i]),
        .b(x[i]),
        .c(1'b0),
        .p(line[j][i+1]),
        .q(garbage[j*N+i]),
        .r(pp[j*N+i])
      );
    end
    assign garbage[N*N+j] = line[j][N];
  end

endmodule
