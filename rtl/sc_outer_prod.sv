// sc_outer_prod: self-checking vector outer product, y[i][j] = a[i] * b[j].
//
// LEN + LEN full reducers on the inputs and LEN*LEN output checkers, each
// with one negated residue product.
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
module sc_outer_prod #(
  parameter int N   = 2,   // shadow (residue) width n
  parameter int W   = 32,  // main datapath width
  parameter int LEN = 3    // vector length
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_vld,
  input  logic [LEN-1:0][W-1:0]            a,
  input  logic [LEN-1:0][W-1:0]            b,
  output logic                             out_vld,
  output logic [LEN-1:0][LEN-1:0][W-1:0]   y,   // y[i][j] = a[i]*b[j]
  output logic                             err_vld,
  output logic                             err
);

  logic [LEN-1:0][N-1:0]       ra, rb, ra_q, rb_q;
  logic [LEN-1:0][LEN-1:0]     e, ev;

  // main datapath
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_vld <= 1'b0;
    else        out_vld <= in_vld;
  end
  always_ff @(posedge clk)
    for (int i = 0; i < LEN; i++)
      for (int j = 0; j < LEN; j++) y[i][j] <= W'(a[i] * b[j]);

  // shadow stage 1
  for (genvar i = 0; i < LEN; i++) begin : g_in
    mod_reducer #(.N(N), .W(W)) u_ra (.a(a[i]), .y(ra[i]));
    mod_reducer #(.N(N), .W(W)) u_rb (.a(b[i]), .y(rb[i]));
  end
  always_ff @(posedge clk) begin
    ra_q <= ra;
    rb_q <= rb;
  end

  // shadow stages 2 and 3
  for (genvar i = 0; i < LEN; i++) begin : g_row
    for (genvar j = 0; j < LEN; j++) begin : g_col
      sc_out_check #(.N(N), .W(W), .TERMS(1), .EXTRA(0)) u_chk (
        .clk(clk), .rst_n(rst_n), .vld_i(out_vld), .y_i(y[i][j]),
        .rx_i(ra_q[i]), .rz_i(rb_q[j]), .add_i('0),
        .err_vld(ev[i][j]), .err(e[i][j])
      );
    end
  end

  assign err_vld = &ev;
  assign err     = |e;

endmodule
