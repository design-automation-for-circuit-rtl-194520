// shadow_datapath_top: the Mersenne modulo shadow-datapath units side by side.
//
// Holds one of each self-checking arithmetic datapath, each with its own
// ports (they share only clock and reset):
//   mac_*   combinational multiply-accumulate  y = a*b + c
//   pmac_*  pipelined multiply-accumulate      y = a*b + c
//   svp_*   scalar-vector product (3 elements)
//   ip_*    inner product of two 3-element vectors
//   op_*    outer product of two 3-element vectors (3x3 result)
//   mv_*    2x3 matrix times 3-element vector
//   mm_*    2x2 by 2x2 matrix product
// and a residue unit, ru_*, exposing the stand-alone modulo functional units
// (reducer, adder, subtractor, multiplier) on n-bit residues.
// Every datapath computes an unsigned W-bit result and raises its err output
// when the result disagrees with the residue computation modulo 2^N - 1.
// The pipelined datapaths give their result one clock after *_in_vld and
// their err/err_vld two clocks after that; the combinational ones respond in
// the same cycle. rst_n is asynchronous, active low.
module shadow_datapath_top #(
  parameter int N = 2,   // shadow (residue) width n, modulo base 2^N - 1
  parameter int W = 32   // main datapath width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // combinational MAC
  input  logic [W-1:0]              mac_a,
  input  logic [W-1:0]              mac_b,
  input  logic [W-1:0]              mac_c,
  output logic [W-1:0]              mac_y,
  output logic                      mac_err,
  // pipelined MAC
  input  logic                      pmac_in_vld,
  input  logic [W-1:0]              pmac_a,
  input  logic [W-1:0]              pmac_b,
  input  logic [W-1:0]              pmac_c,
  output logic                      pmac_out_vld,
  output logic [W-1:0]              pmac_y,
  output logic                      pmac_err_vld,
  output logic                      pmac_err,
  // scalar-vector product
  input  logic                      svp_in_vld,
  input  logic [W-1:0]              svp_s,
  input  logic [2:0][W-1:0]         svp_v,
  output logic                      svp_out_vld,
  output logic [2:0][W-1:0]         svp_y,
  output logic                      svp_err_vld,
  output logic                      svp_err,
  // inner product
  input  logic                      ip_in_vld,
  input  logic [2:0][W-1:0]         ip_a,
  input  logic [2:0][W-1:0]         ip_b,
  output logic                      ip_out_vld,
  output logic [W-1:0]              ip_y,
  output logic                      ip_err_vld,
  output logic                      ip_err,
  // outer product
  input  logic                      op_in_vld,
  input  logic [2:0][W-1:0]         op_a,
  input  logic [2:0][W-1:0]         op_b,
  output logic                      op_out_vld,
  output logic [2:0][2:0][W-1:0]    op_y,
  output logic                      op_err_vld,
  output logic                      op_err,
  // matrix-vector product
  input  logic                      mv_in_vld,
  input  logic [1:0][2:0][W-1:0]    mv_m,
  input  logic [2:0][W-1:0]         mv_v,
  output logic                      mv_out_vld,
  output logic [1:0][W-1:0]         mv_y,
  output logic                      mv_err_vld,
  output logic                      mv_err,
  // matrix product
  input  logic                      mm_in_vld,
  input  logic [1:0][1:0][W-1:0]    mm_a,
  input  logic [1:0][1:0][W-1:0]    mm_b,
  output logic                      mm_out_vld,
  output logic [1:0][1:0][W-1:0]    mm_c,
  output logic                      mm_err_vld,
  output logic                      mm_err,
  // residue unit
  input  logic [W-1:0]              ru_x,     // integer to reduce
  input  logic [N-1:0]              ru_a,
  input  logic [N-1:0]              ru_b,
  output logic [N-1:0]              ru_xres,  // ru_x mod M
  output logic [N-1:0]              ru_sum,   // a + b mod M
  output logic [N-1:0]              ru_diff,  // a - b mod M
  output logic [N-1:0]              ru_prod   // a * b mod M
);

  sc_mac #(.N(N), .W(W)) u_mac (
    .a(mac_a), .b(mac_b), .c(mac_c), .y(mac_y), .err(mac_err)
  );

  sc_mac_pipe #(.N(N), .W(W)) u_pmac (
    .clk(clk), .rst_n(rst_n), .in_vld(pmac_in_vld),
    .a(pmac_a), .b(pmac_b), .c(pmac_c),
    .out_vld(pmac_out_vld), .y(pmac_y), .err_vld(pmac_err_vld), .err(pmac_err)
  );

  sc_scalar_vec #(.N(N), .W(W), .LEN(3)) u_svp (
    .clk(clk), .rst_n(rst_n), .in_vld(svp_in_vld), .s(svp_s), .v(svp_v),
    .out_vld(svp_out_vld), .y(svp_y), .err_vld(svp_err_vld), .err(svp_err)
  );

  sc_inner_prod #(.N(N), .W(W), .LEN(3)) u_ip (
    .clk(clk), .rst_n(rst_n), .in_vld(ip_in_vld), .a(ip_a), .b(ip_b),
    .out_vld(ip_out_vld), .y(ip_y), .err_vld(ip_err_vld), .err(ip_err)
  );

  sc_outer_prod #(.N(N), .W(W), .LEN(3)) u_op (
    .clk(clk), .rst_n(rst_n), .in_vld(op_in_vld), .a(op_a), .b(op_b),
    .out_vld(op_out_vld), .y(op_y), .err_vld(op_err_vld), .err(op_err)
  );

  sc_matvec #(.N(N), .W(W), .ROWS(2), .COLS(3)) u_mv (
    .clk(clk), .rst_n(rst_n), .in_vld(mv_in_vld), .m(mv_m), .v(mv_v),
    .out_vld(mv_out_vld), .y(mv_y), .err_vld(mv_err_vld), .err(mv_err)
  );

  sc_matmul #(.N(N), .W(W), .DIM(2)) u_mm (
    .clk(clk), .rst_n(rst_n), .in_vld(mm_in_vld), .a(mm_a), .b(mm_b),
    .out_vld(mm_out_vld), .c(mm_c), .err_vld(mm_err_vld), .err(mm_err)
  );

  mod_reducer    #(.N(N), .W(W)) u_ru_red (.a(ru_x), .y(ru_xres));
  mod_adder      #(.N(N)) u_ru_add (.a(ru_a), .b(ru_b), .y(ru_sum));
  mod_subtractor #(.N(N)) u_ru_sub (.a(ru_a), .b(ru_b), .y(ru_diff));
  mod_multiplier #(.N(N)) u_ru_mul (.a(ru_a), .b(ru_b), .y(ru_prod));

endmodule
