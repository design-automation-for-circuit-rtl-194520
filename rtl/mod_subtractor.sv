// mod_subtractor: y = a - b (mod 2^n - 1).
//
// Composed as a + (-b): the subtrahend goes through the bitwise-complement
// negator and then the end-around-carry modulo adder. Non-normalized residues
// in and out. Combinational.
module mod_subtractor #(
  parameter int N = 2  // residue width n
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);

  logic [N-1:0] nb;

  mod_negate #(.N(N)) u_neg (.a(b), .y(nb));
  mod_adder  #(.N(N)) u_add (.a(a), .b(nb), .y(y));

endmodule
