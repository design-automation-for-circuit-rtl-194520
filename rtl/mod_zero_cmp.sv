// mod_zero_cmp: tests whether a + b = 0 (mod 2^n - 1) for two n-bit rows.
//
// The checker takes the two rows left by a partial reducer, so it never needs
// the final modulo adder. For non-normalized residues a + b lies in
// {0, M, 2M} exactly when (1) a and b are bitwise complements (sum M), or
// (2) both are all zeros, or (3) both are all ones (sum 2M). The circuit
// forms these three terms directly: an XOR per bit reduced by AND for (1),
// a NOR of all bits for (2) and an AND of all bits for (3). The condition is
// the published one; this particular gate network is this design's own.
// Combinational; is_zero = 1 means the check passed.
module mod_zero_cmp #(
  parameter int N = 2  // residue width n
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         is_zero
);

  logic complement, all_zero, all_one;

  always_comb begin
    complement = &(a ^ b);
    all_zero   = ~|(a | b);
    all_one    = &(a & b);
    is_zero    = complement | all_zero | all_one;
  end

endmodule
