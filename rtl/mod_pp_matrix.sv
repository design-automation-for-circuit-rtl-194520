// mod_pp_matrix: wrapped partial-product array of a Mersenne modulo multiplier.
//
// Every pair of bits a[i], b[j] is combined in a 2-input AND gate. The
// product bit has weight 2^(i+j), which modulo 2^n - 1 equals 2^((i+j) mod n),
// so the n^2 products form an n x n square instead of the trapezoid of an
// integer multiplier: row j holds a AND b[j], rotated left by j positions.
// The sum of the n rows is congruent to a * b. With NEGATE = 1 the gates are
// NANDs, every row is complemented and the rows sum to -(a * b). Combinational,
// one gate level.
module mod_pp_matrix #(
  parameter int N      = 2,    // residue width n
  parameter bit NEGATE = 1'b0  // 1: NAND array, rows sum to -(a*b)
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // pp[j][k]: bit of weight 2^k in row j
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < N; k++) begin
        pp[j][k] = (a[(k - j + N) % N] & b[j]) ^ NEGATE;
      end
    end
  end

endmodule
