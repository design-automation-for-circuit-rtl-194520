// mod_multiplier: n-bit Mersenne modulo multiplier, y = a * b (mod 2^n - 1).
//
// An array multiplier whose bit weights wrap round: the n x n AND array of
// mod_pp_matrix yields n residue rows, a full-adder tree (mod_row_reduce)
// brings them to two rows and a modulo adder produces the n-bit residue.
// Non-normalized residues in and out. Combinational.
module mod_multiplier #(
  parameter int N = 2  // residue width n
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);

  logic [N-1:0][N-1:0] pp;
  logic [1:0][N-1:0]   rows;

  mod_pp_matrix  #(.N(N), .NEGATE(1'b0)) u_pp   (.a(a), .b(b), .pp(pp));
  mod_row_reduce #(.N(N), .ROWS(N))      u_tree (.rows_i(pp), .rows_o(rows));
  mod_adder      #(.N(N))                u_add  (.a(rows[0]), .b(rows[1]), .y(y));

endmodule
