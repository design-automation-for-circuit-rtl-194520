// sc_mac_pipe: pipelined self-checking multiply-accumulator, y = a * b + c.
//
// Same arithmetic as sc_mac, cut into pipeline stages so that the slower
// shadow datapath does not lengthen the clock period:
//   main datapath, 1 stage:  a*b+c (W bits, truncated) -> result register y.
//   shadow stage 1:  full reducers of a and b (n bits each) and a partial
//                    reducer of c (2n bits), registered; the c rows are
//                    stored inverted, so the register holds -c mod M.
//   shadow stage 2:  NAND product array of the a, b residues, full-adder tree
//                    over y, the product rows and the -c rows -> 2 rows, reg.
//   shadow stage 3:  zero comparator -> error register.
// Timing: inputs sampled with in_vld at edge k give y/out_vld after edge k,
// and err/err_vld two clocks later, after edge k+2. A new operation can be
// issued every clock. err also flags results that overflowed W bits.
// rst_n is asynchronous, active low, and clears only the valid bits. The
// stage split and the inverting c register follow the published pipeline;
// the valid handshake and the reset are this design's own choices.
module sc_mac_pipe #(
  parameter int N = 2,   // shadow (residue) width n
  parameter int W = 32   // main datapath width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vld,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic         out_vld,
  output logic [W-1:0] y,
  output logic         err_vld,
  output logic         err
);

  logic [N-1:0]      ra, rb, ra_q, rb_q;
  logic [1:0][N-1:0] rc, nrc_q;

  // main datapath with its single pipeline register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_vld <= 1'b0;
    else        out_vld <= in_vld;
  end
  always_ff @(posedge clk) y <= W'(a * b + c);

  // shadow stage 1
  mod_reducer      #(.N(N), .W(W)) u_ra (.a(a), .y(ra));
  mod_reducer      #(.N(N), .W(W)) u_rb (.a(b), .y(rb));
  mod_part_reducer #(.N(N), .W(W)) u_rc (.a(c), .rows_o(rc));

  always_ff @(posedge clk) begin
    ra_q  <= ra;
    rb_q  <= rb;
    nrc_q <= ~rc;   // inverting flip-flops: -c mod M
  end

  // shadow stages 2 and 3
  sc_out_check #(.N(N), .W(W), .TERMS(1), .EXTRA(2)) u_chk (
    .clk    (clk),
    .rst_n  (rst_n),
    .vld_i  (out_vld),
    .y_i    (y),
    .rx_i   (ra_q),
    .rz_i   (rb_q),
    .add_i  (nrc_q),
    .err_vld(err_vld),
    .err    (err)
  );

endmodule
