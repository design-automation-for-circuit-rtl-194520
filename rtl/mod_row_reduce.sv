// mod_row_reduce: partial modulo reduction of a stack of residue rows.
//
// ROWS rows of n bits, each read as a residue modulo M = 2^n - 1, are reduced
// to two rows with the same sum modulo M. In every step the rows are taken in
// triplets from the top of the stack (consecutive rows: the grouping is this
// design's choice, any grouping gives the same residue); each triplet passes through an n-wide
// full-adder block (mod_fa_row) and becomes two rows, and the one or two rows
// left over are carried to the next step unchanged. Steps repeat until fewer
// than three rows remain, so the whole tree is built from full adders only
// and each full adder removes one bit. With a single input row the second
// output row is zero. Combinational; depth is num_stages(ROWS) full adders.
module mod_row_reduce
  import mersenne_pkg::*;
#(
  parameter int N    = 2,   // residue width n
  parameter int ROWS = 16   // number of input rows
) (
  input  logic [ROWS-1:0][N-1:0] rows_i,
  output logic [1:0][N-1:0]      rows_o
);

  localparam int NSTG = num_stages(ROWS);

  // st[k] holds the rows present before step k; only the first
  // rows_after(ROWS, k) entries are meaningful, the rest are held at zero.
  logic [NSTG:0][ROWS-1:0][N-1:0] st;

  assign st[0] = rows_i;

  for (genvar k = 0; k < NSTG; k++) begin : g_stage
    localparam int RK = rows_after(ROWS, k);
    localparam int G  = RK / 3;
    localparam int L  = RK % 3;
    localparam int RN = 2 * G + L;
    for (genvar g = 0; g < G; g++) begin : g_fa
      mod_fa_row #(.N(N)) u_fa (
        .x(st[k][3*g]),
        .y(st[k][3*g+1]),
        .z(st[k][3*g+2]),
        .s(st[k+1][2*g]),
        .c(st[k+1][2*g+1])
      );
    end
    for (genvar l = 0; l < L; l++) begin : g_left
      assign st[k+1][2*G+l] = st[k][3*G+l];
    end
    for (genvar r = RN; r < ROWS; r++) begin : g_unused
      assign st[k+1][r] = '0;
    end
  end

  if (ROWS >= 2) begin : g_two
    assign rows_o = {st[NSTG][1], st[NSTG][0]};
  end else begin : g_one
    assign rows_o = {{N{1'b0}}, st[NSTG][0]};
  end

endmodule
