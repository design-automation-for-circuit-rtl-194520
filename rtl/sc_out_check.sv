// sc_out_check: back end of a pipelined modulo shadow datapath for one output.
//
// The main datapath claims y = sum over t of x_t * z_t (+ an optional
// addend). This unit holds that claim against the shadow residues of the
// operands, two pipeline stages after the main result register:
//
//   stage 2 (combinational, then registered): the W-bit result y is cut into
//     ceil(W/n) residue rows; each term's residues feed a NAND product array
//     (n rows summing to -(x_t * z_t)); EXTRA already-negated addend rows are
//     appended. A full-adder tree reduces the whole stack to two rows, whose
//     sum is 0 (mod 2^n - 1) exactly when the residues agree.
//   stage 3 (combinational, then registered): the two rows go through the
//     zero comparator; err is raised when the sum is not zero.
//
// Inputs are the stage-1 registers of the enclosing datapath and are sampled
// with vld_i. err_vld goes high two clocks after vld_i, together with err.
// The stage split follows the pipelined MAC it was written for; the valid
// bits and their reset are this design's own additions.
// err is 0 whenever err_vld is 0. rst_n (asynchronous, active low) clears the
// valid pipeline only; data registers are not reset.
module sc_out_check
  import mersenne_pkg::*;
#(
  parameter int N     = 2,   // residue width n
  parameter int W     = 32,  // main result width
  parameter int TERMS = 1,   // number of products summed in the result
  parameter int EXTRA = 0    // number of negated addend rows (0 = none)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                vld_i,
  input  logic [W-1:0]                        y_i,    // main result (registered)
  input  logic [TERMS-1:0][N-1:0]             rx_i,   // residues of first factors
  input  logic [TERMS-1:0][N-1:0]             rz_i,   // residues of second factors
  input  logic [(EXTRA > 0 ? EXTRA : 1)-1:0][N-1:0] add_i, // negated addend rows
  output logic                                err_vld,
  output logic                                err
);

  localparam int RY    = ceil_div(W, N);
  localparam int RPROD = TERMS * N;
  localparam int ROWS  = RY + RPROD + EXTRA;

  logic [RY*N-1:0]         y_pad;
  logic [ROWS-1:0][N-1:0]  stack;
  logic [TERMS-1:0][N-1:0][N-1:0] pp;
  logic [1:0][N-1:0]       rows2, rows2_q;
  logic                    vld2_q;
  logic                    is_zero;

  assign y_pad = {{(RY*N-W){1'b0}}, y_i};

  for (genvar t = 0; t < TERMS; t++) begin : g_term
    mod_pp_matrix #(.N(N), .NEGATE(1'b1)) u_pp (
      .a (rx_i[t]),
      .b (rz_i[t]),
      .pp(pp[t])
    );
  end

  always_comb begin
    for (int r = 0; r < RY; r++) stack[r] = y_pad[r*N +: N];
    for (int t = 0; t < TERMS; t++)
      for (int j = 0; j < N; j++) stack[RY + t*N + j] = pp[t][j];
    for (int e = 0; e < EXTRA; e++) stack[RY + RPROD + e] = add_i[e];
  end

  mod_row_reduce #(.N(N), .ROWS(ROWS)) u_tree (
    .rows_i(stack),
    .rows_o(rows2)
  );

  // stage 2 register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld2_q <= 1'b0;
    else        vld2_q <= vld_i;
  end
  always_ff @(posedge clk) rows2_q <= rows2;

  mod_zero_cmp #(.N(N)) u_zero (
    .a      (rows2_q[0]),
    .b      (rows2_q[1]),
    .is_zero(is_zero)
  );

  // stage 3 register: the error flag
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_vld <= 1'b0;
      err     <= 1'b0;
    end else begin
      err_vld <= vld2_q;
      err     <= vld2_q & ~is_zero;
    end
  end

  // err is only ever raised together with err_vld
  a_err_qualified: assert property (@(posedge clk) err |-> err_vld);

endmodule
