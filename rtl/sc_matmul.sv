// sc_matmul: self-checking square matrix product, c[i][j] = sum_k a[i][k] * b[k][j].
//
// Two DIM x DIM matrices. Every element of both has a full reducer; each of
// the DIM*DIM results is checked against DIM negated residue products.
// Pipelining follows the self-checking MAC (sc_mac_pipe): the main result is
// registered once (out_vld one clock after in_vld); the shadow datapath
// registers the operand residues in stage 1, reduces each result together
// with its negated residue products in stage 2 (sc_out_check) and compares
// with zero in stage 3, so err/err_vld follow out_vld by two clocks. err is
// the OR of the per-output checks and also flags results that overflow W
// bits. All arithmetic is unsigned and truncated to W bits. A new operation
// can be issued every clock. rst_n (asynchronous, active low) clears only
// the valid bits. The element count was chosen to match the published
// reducer and multiplier counts of this primitive; the valid handshake, the
// unsigned truncating arithmetic and the OR of per-element errors are this
// design's own choices.
module sc_matmul #(
  parameter int N   = 2,   // shadow (residue) width n
  parameter int W   = 32,  // main datapath width
  parameter int DIM = 2    // matrix dimension
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_vld,
  input  logic [DIM-1:0][DIM-1:0][W-1:0]   a,
  input  logic [DIM-1:0][DIM-1:0][W-1:0]   b,
  output logic                             out_vld,
  output logic [DIM-1:0][DIM-1:0][W-1:0]   c,
  output logic                             err_vld,
  output logic                             err
);

  logic [DIM-1:0][DIM-1:0][N-1:0] ra, rb, ra_q, rb_q;
  logic [DIM-1:0][DIM-1:0][N-1:0] rb_t;   // columns of b as rows
  logic [DIM-1:0][DIM-1:0][W-1:0] acc;
  logic [DIM-1:0][DIM-1:0]        e, ev;

  // main datapath
  always_comb begin
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        acc[i][j] = '0;
        for (int k = 0; k < DIM; k++) acc[i][j] = W'(acc[i][j] + a[i][k] * b[k][j]);
      end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_vld <= 1'b0;
    else        out_vld <= in_vld;
  end
  always_ff @(posedge clk) c <= acc;

  // shadow stage 1
  for (genvar i = 0; i < DIM; i++) begin : g_r
    for (genvar k = 0; k < DIM; k++) begin : g_c
      mod_reducer #(.N(N), .W(W)) u_ra (.a(a[i][k]), .y(ra[i][k]));
      mod_reducer #(.N(N), .W(W)) u_rb (.a(b[i][k]), .y(rb[i][k]));
    end
  end
  always_ff @(posedge clk) begin
    ra_q <= ra;
    rb_q <= rb;
  end

  always_comb
    for (int j = 0; j < DIM; j++)
      for (int k = 0; k < DIM; k++) rb_t[j][k] = rb_q[k][j];

  // shadow stages 2 and 3
  for (genvar i = 0; i < DIM; i++) begin : g_row
    for (genvar j = 0; j < DIM; j++) begin : g_col
      sc_out_check #(.N(N), .W(W), .TERMS(DIM), .EXTRA(0)) u_chk (
        .clk(clk), .rst_n(rst_n), .vld_i(out_vld), .y_i(c[i][j]),
        .rx_i(ra_q[i]), .rz_i(rb_t[j]), .add_i('0),
        .err_vld(ev[i][j]), .err(e[i][j])
      );
    end
  end

  assign err_vld = &ev;
  assign err     = |e;

endmodule
