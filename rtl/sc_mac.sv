// sc_mac: combinational self-checking multiply-accumulator, y = a * b + c.
//
// Main datapath: an unsigned W-bit multiply-add, truncated to W bits.
// Shadow datapath, all modulo M = 2^n - 1 with n = N:
//   - a and b go through full reducers to n-bit residues;
//   - c goes through a partial reducer to two rows, which are inverted
//     (giving -c mod M);
//   - the residues of a and b feed a NAND product array (n rows, -(a*b));
//   - the main result y, cut into n-bit rows, the product rows and the two
//     -c rows are reduced together by a full-adder tree to two rows;
//   - a zero comparator checks that those two rows sum to 0 mod M.
// err = 1 flags a mismatch: a fault in either datapath, or a result that
// overflowed W bits (then y differs from a*b+c by a multiple of 2^W, which is
// not a multiple of M). Purely combinational.
module sc_mac
  import mersenne_pkg::*;
#(
  parameter int N = 2,   // shadow (residue) width n
  parameter int W = 32   // main datapath width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         err
);

  localparam int RY   = ceil_div(W, N);
  localparam int ROWS = RY + N + 2;

  logic [N-1:0]            ra, rb;
  logic [1:0][N-1:0]       rc;
  logic [N-1:0][N-1:0]     pp;
  logic [RY*N-1:0]         y_pad;
  logic [ROWS-1:0][N-1:0]  stack;
  logic [1:0][N-1:0]       rows2;
  logic                    is_zero;

  // main datapath
  assign y = W'(a * b + c);

  // shadow datapath
  mod_reducer      #(.N(N), .W(W)) u_ra (.a(a), .y(ra));
  mod_reducer      #(.N(N), .W(W)) u_rb (.a(b), .y(rb));
  mod_part_reducer #(.N(N), .W(W)) u_rc (.a(c), .rows_o(rc));
  mod_pp_matrix    #(.N(N), .NEGATE(1'b1)) u_pp (.a(ra), .b(rb), .pp(pp));

  assign y_pad = {{(RY*N-W){1'b0}}, y};

  always_comb begin
    for (int r = 0; r < RY; r++) stack[r] = y_pad[r*N +: N];
    for (int j = 0; j < N; j++) stack[RY + j] = pp[j];
    stack[RY + N]     = ~rc[0];
    stack[RY + N + 1] = ~rc[1];
  end

  mod_row_reduce #(.N(N), .ROWS(ROWS)) u_tree (.rows_i(stack), .rows_o(rows2));
  mod_zero_cmp   #(.N(N)) u_zero (.a(rows2[0]), .b(rows2[1]), .is_zero(is_zero));

  assign err = ~is_zero;

endmodule
