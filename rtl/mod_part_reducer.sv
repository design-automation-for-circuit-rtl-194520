// mod_part_reducer: partial reduction of a W-bit integer modulo 2^n - 1.
//
// The input is cut into ceil(W/n) n-bit rows (bit i lands in row i/n at
// position i mod n, the top row padded with zeros), which is legal because
// 2^i = 2^(i mod n) modulo M. The rows are then reduced with full adders only
// (mod_row_reduce) to two n-bit rows whose sum is congruent to the input.
// The 2n-bit result is used where a following unit accepts two rows, which
// avoids the half-adder stage of a final modulo adder. Combinational.
module mod_part_reducer
  import mersenne_pkg::*;
#(
  parameter int N = 2,   // residue width n
  parameter int W = 32   // input width w (w >= 2n)
) (
  input  logic [W-1:0]      a,
  output logic [1:0][N-1:0] rows_o
);

  localparam int R = ceil_div(W, N);

  logic [R*N-1:0]       padded;
  logic [R-1:0][N-1:0]  rows;

  assign padded = {{(R*N-W){1'b0}}, a};
  assign rows   = padded;

  mod_row_reduce #(.N(N), .ROWS(R)) u_tree (
    .rows_i(rows),
    .rows_o(rows_o)
  );

endmodule
