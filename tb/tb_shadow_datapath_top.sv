// tb_shadow_datapath_top: end-to-end test of the whole design at its
// default sizes (32-bit datapaths, 2-bit residues modulo 3).
//
// Every clock (with random gaps) all seven self-checking datapaths get new
// operands, either "small" ones (below 2^15, so no result can overflow and
// err must stay 0) or full-range ones with a random number of leading zeros.
// Results of the MACs, inner product and matrix product are compared with a
// full-precision reference, their err outputs with a residue model; for the
// scalar-vector, outer and matrix-vector products err must be 0 on small
// operands. The residue unit is checked exhaustively on the side.
// Mechanisms counted (each must occur): an error flagged by each datapath,
// a clean result from each, back-to-back issue, and the all-ones (-0)
// encoding of zero leaving the residue unit.
module tb_shadow_datapath_top;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [31:0] mac_a, mac_b, mac_c, mac_y; logic mac_err;
  logic pmac_in_vld, pmac_out_vld, pmac_err_vld, pmac_err; logic [31:0] pmac_a, pmac_b, pmac_c, pmac_y;
  logic svp_out_vld, svp_err_vld, svp_err; logic [31:0] svp_s; logic [2:0][31:0] svp_v, svp_y;
  logic ip_out_vld, ip_err_vld, ip_err; logic [2:0][31:0] ip_a, ip_b; logic [31:0] ip_y;
  logic op_out_vld, op_err_vld, op_err; logic [2:0][31:0] op_a, op_b; logic [2:0][2:0][31:0] op_y;
  logic mv_out_vld, mv_err_vld, mv_err; logic [1:0][2:0][31:0] mv_m; logic [2:0][31:0] mv_v; logic [1:0][31:0] mv_y;
  logic mm_out_vld, mm_err_vld, mm_err; logic [1:0][1:0][31:0] mm_a, mm_b, mm_c;
  logic [31:0] ru_x; logic [1:0] ru_a, ru_b, ru_xres, ru_sum, ru_diff, ru_prod;
  logic vld;

  shadow_datapath_top dut (
    .clk(clk), .rst_n(rst_n),
    .mac_a(mac_a), .mac_b(mac_b), .mac_c(mac_c), .mac_y(mac_y), .mac_err(mac_err),
    .pmac_in_vld(vld), .pmac_a(pmac_a), .pmac_b(pmac_b), .pmac_c(pmac_c),
    .pmac_out_vld(pmac_out_vld), .pmac_y(pmac_y), .pmac_err_vld(pmac_err_vld), .pmac_err(pmac_err),
    .svp_in_vld(vld), .svp_s(svp_s), .svp_v(svp_v),
    .svp_out_vld(svp_out_vld), .svp_y(svp_y), .svp_err_vld(svp_err_vld), .svp_err(svp_err),
    .ip_in_vld(vld), .ip_a(ip_a), .ip_b(ip_b),
    .ip_out_vld(ip_out_vld), .ip_y(ip_y), .ip_err_vld(ip_err_vld), .ip_err(ip_err),
    .op_in_vld(vld), .op_a(op_a), .op_b(op_b),
    .op_out_vld(op_out_vld), .op_y(op_y), .op_err_vld(op_err_vld), .op_err(op_err),
    .mv_in_vld(vld), .mv_m(mv_m), .mv_v(mv_v),
    .mv_out_vld(mv_out_vld), .mv_y(mv_y), .mv_err_vld(mv_err_vld), .mv_err(mv_err),
    .mm_in_vld(vld), .mm_a(mm_a), .mm_b(mm_b),
    .mm_out_vld(mm_out_vld), .mm_c(mm_c), .mm_err_vld(mm_err_vld), .mm_err(mm_err),
    .ru_x(ru_x), .ru_a(ru_a), .ru_b(ru_b),
    .ru_xres(ru_xres), .ru_sum(ru_sum), .ru_diff(ru_diff), .ru_prod(ru_prod)
  );

  typedef struct {
    int          cyc;
    bit          sml;
    logic [31:0] pmac_y, ip_y;
    logic [1:0][1:0][31:0] mm_c;
    bit          pmac_e, ip_e, mm_e;
  } op_t;
  op_t res_q[$], err_q[$];

  // per-datapath counts of flagged errors and clean results: mac pmac svp ip op mv mm
  int n_det[7], n_clean[7];
  int n_b2b = 0, n_negzero = 0;

  function automatic logic [31:0] rnd(bit sml);
    if (sml) return 32'($urandom % 32768);
    return $urandom >> ($urandom % 33);
  endfunction

  function automatic bit ovf(logic [127:0] full);
    return (full % 3) != 128'(full[31:0] % 3);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pmac_out_vld) begin
      op_t o;
      checks++;
      if (res_q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        o = res_q.pop_front();
        if (cycle != o.cyc + 1 || pmac_y != o.pmac_y || ip_y != o.ip_y || mm_c != o.mm_c ||
            !svp_out_vld || !ip_out_vld || !op_out_vld || !mv_out_vld || !mm_out_vld) begin
          failures++; $display("result mismatch at %0d", cycle);
        end
      end
    end
    if (pmac_err_vld) begin
      op_t o;
      bit [6:0] e;
      checks++;
      e = {mm_err, mv_err, op_err, ip_err, svp_err, pmac_err, 1'b0};
      if (err_q.size() == 0) begin failures++; $display("unexpected err_vld"); end
      else begin
        o = err_q.pop_front();
        if (cycle != o.cyc + 3 || pmac_err != o.pmac_e || ip_err != o.ip_e || mm_err != o.mm_e ||
            !svp_err_vld || !ip_err_vld || !op_err_vld || !mv_err_vld || !mm_err_vld ||
            (o.sml && e != 0)) begin
          failures++; $display("err mismatch at %0d: %b", cycle, e);
        end
      end
      for (int k = 1; k < 7; k++) if (e[k]) n_det[k]++; else n_clean[k]++;
    end
  end

  initial begin
    logic [127:0] full;
    bit sml, prev = 0;
    op_t o;
    vld = 0;
    {mac_a, mac_b, mac_c, pmac_a, pmac_b, pmac_c, svp_s} = '0;
    svp_v = '0; ip_a = '0; ip_b = '0; op_a = '0; op_b = '0; mv_m = '0; mv_v = '0; mm_a = '0; mm_b = '0;
    ru_x = 0; ru_a = 0; ru_b = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      sml = ($urandom % 3) == 0;
      vld = ($urandom % 4) != 0;
      mac_a = rnd(sml); mac_b = rnd(sml); mac_c = rnd(sml);
      pmac_a = rnd(sml); pmac_b = rnd(sml); pmac_c = rnd(sml);
      svp_s = rnd(sml);
      for (int i = 0; i < 3; i++) begin
        svp_v[i] = rnd(sml); ip_a[i] = rnd(sml); ip_b[i] = rnd(sml);
        op_a[i] = rnd(sml); op_b[i] = rnd(sml); mv_v[i] = rnd(sml);
        mv_m[0][i] = rnd(sml); mv_m[1][i] = rnd(sml);
      end
      for (int i = 0; i < 2; i++) for (int k = 0; k < 2; k++) begin mm_a[i][k] = rnd(sml); mm_b[i][k] = rnd(sml); end
      ru_x = $urandom; ru_a = 2'(t); ru_b = 2'(t >> 2);
      #1;
      // combinational MAC and residue unit, checked in the same cycle
      full = 128'(mac_a) * 128'(mac_b) + 128'(mac_c);
      checks += 6;
      if (mac_y != full[31:0] || mac_err != ovf(full)) begin failures++; $display("mac mismatch"); end
      if (mac_err) n_det[0]++; else n_clean[0]++;
      if (int'(ru_xres) % 3 != int'(ru_x % 3)) begin failures++; $display("ru reducer"); end
      if (int'(ru_sum) % 3 != (int'(ru_a) + int'(ru_b)) % 3) begin failures++; $display("ru add"); end
      if (int'(ru_diff) % 3 != (int'(ru_a) - int'(ru_b) + 3) % 3) begin failures++; $display("ru sub"); end
      if (int'(ru_prod) % 3 != (int'(ru_a) * int'(ru_b)) % 3) begin failures++; $display("ru mul"); end
      if (ru_sum == 2'b11 || ru_diff == 2'b11 || ru_prod == 2'b11 || ru_xres == 2'b11) n_negzero++;
      if (vld) begin
        if (prev) n_b2b++;
        o.cyc = cycle; o.sml = sml;
        full = 128'(pmac_a) * 128'(pmac_b) + 128'(pmac_c);
        o.pmac_y = full[31:0]; o.pmac_e = ovf(full);
        full = 0; for (int i = 0; i < 3; i++) full += 128'(ip_a[i]) * 128'(ip_b[i]);
        o.ip_y = full[31:0]; o.ip_e = ovf(full);
        o.mm_e = 0;
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
          full = 0; for (int k = 0; k < 2; k++) full += 128'(mm_a[i][k]) * 128'(mm_b[k][j]);
          o.mm_c[i][j] = full[31:0]; o.mm_e |= ovf(full);
        end
        res_q.push_back(o); err_q.push_back(o);
      end
      prev = vld;
    end
    @(negedge clk); vld = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (res_q.size() != 0 || err_q.size() != 0) begin failures++; $display("missing results"); end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (n_det[k] == 0 || n_clean[k] == 0) begin failures++; $display("datapath %0d: detected %0d clean %0d", k, n_det[k], n_clean[k]); end
    end
    checks++;
    if (n_b2b == 0 || n_negzero == 0) begin failures++; $display("back-to-back or -0 never seen"); end
    $display("detected: mac %0d pmac %0d svp %0d ip %0d op %0d mv %0d mm %0d", n_det[0], n_det[1], n_det[2], n_det[3], n_det[4], n_det[5], n_det[6]);
    $display("clean:    mac %0d pmac %0d svp %0d ip %0d op %0d mv %0d mm %0d", n_clean[0], n_clean[1], n_clean[2], n_clean[3], n_clean[4], n_clean[5], n_clean[6]);
    $display("back_to_back=%0d negative_zero=%0d", n_b2b, n_negzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
