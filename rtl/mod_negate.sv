// mod_negate: residue negation modulo 2^n - 1.
//
// Since M - a = (2^n - 1) - a is the bitwise complement of a, negation is one
// inverter per bit; zero maps to -0 (all ones) and back. In a larger design
// these inverters are meant to be merged into neighbouring cells (NAND
// instead of AND in a product array, inverting flip-flops). Combinational.
module mod_negate #(
  parameter int N = 2  // residue width n
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] y   // y = -a (mod 2^n - 1)
);

  assign y = ~a;

endmodule
