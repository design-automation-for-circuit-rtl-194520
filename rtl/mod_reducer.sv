// mod_reducer: full reducer, y = a mod (2^n - 1) for a W-bit input.
//
// A partial reducer (mod_part_reducer: rows of n bits summed by a tree of
// full adders) brings the input down to two residue rows, and a modulo adder
// (mod_adder) adds them into one n-bit residue. The result is non-normalized:
// a multiple of M may come out as all zeros or as all ones. Combinational.
module mod_reducer #(
  parameter int N = 2,   // residue width n
  parameter int W = 32   // input width w (w >= 2n)
) (
  input  logic [W-1:0] a,
  output logic [N-1:0] y
);

  logic [1:0][N-1:0] rows;

  mod_part_reducer #(.N(N), .W(W)) u_part (
    .a     (a),
    .rows_o(rows)
  );

  mod_adder #(.N(N)) u_add (
    .a(rows[0]),
    .b(rows[1]),
    .y(y)
  );

endmodule
