// sc_scalar_vec: self-checking scalar-vector product, y[i] = s * v[i].
//
// LEN products share the residue of the scalar s; each element v[i] has its
// own full reducer, and each output y[i] its own checker.
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
module sc_scalar_vec #(
  parameter int N   = 2,   // shadow (residue) width n
  parameter int W   = 32,  // main datapath width
  parameter int LEN = 3    // vector length
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_vld,
  input  logic [W-1:0]            s,
  input  logic [LEN-1:0][W-1:0]   v,
  output logic                    out_vld,
  output logic [LEN-1:0][W-1:0]   y,
  output logic                    err_vld,
  output logic                    err
);

  logic [N-1:0]            rs, rs_q;
  logic [LEN-1:0][N-1:0]   rv, rv_q;
  logic [LEN-1:0]          e, ev;

  // main datapath
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_vld <= 1'b0;
    else        out_vld <= in_vld;
  end
  always_ff @(posedge clk)
    for (int i = 0; i < LEN; i++) y[i] <= W'(s * v[i]);

  // shadow stage 1
  mod_reducer #(.N(N), .W(W)) u_rs (.a(s), .y(rs));
  for (genvar i = 0; i < LEN; i++) begin : g_in
    mod_reducer #(.N(N), .W(W)) u_rv (.a(v[i]), .y(rv[i]));
  end
  always_ff @(posedge clk) begin
    rs_q <= rs;
    rv_q <= rv;
  end

  // shadow stages 2 and 3
  for (genvar i = 0; i < LEN; i++) begin : g_chk
    sc_out_check #(.N(N), .W(W), .TERMS(1), .EXTRA(0)) u_chk (
      .clk(clk), .rst_n(rst_n), .vld_i(out_vld), .y_i(y[i]),
      .rx_i(rs_q), .rz_i(rv_q[i]), .add_i('0),
      .err_vld(ev[i]), .err(e[i])
    );
  end

  assign err_vld = &ev;
  assign err     = |e;

endmodule
