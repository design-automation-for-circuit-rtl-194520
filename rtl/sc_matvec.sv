// sc_matvec: self-checking matrix-vector product, y[i] = sum_j m[i][j] * v[j].
//
// A ROWS x COLS matrix times a COLS-element vector. Every matrix and vector
// element has a full reducer; each of the ROWS results is checked against
// COLS negated residue products.
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
module sc_matvec #(
  parameter int N    = 2,   // shadow (residue) width n
  parameter int W    = 32,  // main datapath width
  parameter int ROWS = 2,   // matrix rows (= result length)
  parameter int COLS = 3    // matrix columns (= vector length)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_vld,
  input  logic [ROWS-1:0][COLS-1:0][W-1:0]  m,
  input  logic [COLS-1:0][W-1:0]            v,
  output logic                              out_vld,
  output logic [ROWS-1:0][W-1:0]            y,
  output logic                              err_vld,
  output logic                              err
);

  logic [ROWS-1:0][COLS-1:0][N-1:0] rm, rm_q;
  logic [COLS-1:0][N-1:0]           rv, rv_q;
  logic [ROWS-1:0][W-1:0]           acc;
  logic [ROWS-1:0]                  e, ev;

  // main datapath
  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      acc[i] = '0;
      for (int j = 0; j < COLS; j++) acc[i] = W'(acc[i] + m[i][j] * v[j]);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_vld <= 1'b0;
    else        out_vld <= in_vld;
  end
  always_ff @(posedge clk) y <= acc;

  // shadow stage 1
  for (genvar j = 0; j < COLS; j++) begin : g_vec
    mod_reducer #(.N(N), .W(W)) u_rv (.a(v[j]), .y(rv[j]));
    for (genvar i = 0; i < ROWS; i++) begin : g_mat
      mod_reducer #(.N(N), .W(W)) u_rm (.a(m[i][j]), .y(rm[i][j]));
    end
  end
  always_ff @(posedge clk) begin
    rm_q <= rm;
    rv_q <= rv;
  end

  // shadow stages 2 and 3
  for (genvar i = 0; i < ROWS; i++) begin : g_chk
    sc_out_check #(.N(N), .W(W), .TERMS(COLS), .EXTRA(0)) u_chk (
      .clk(clk), .rst_n(rst_n), .vld_i(out_vld), .y_i(y[i]),
      .rx_i(rm_q[i]), .rz_i(rv_q), .add_i('0),
      .err_vld(ev[i]), .err(e[i])
    );
  end

  assign err_vld = &ev;
  assign err     = |e;

endmodule
