// tb_sc_inner_prod: streams random operands through sc_inner_prod (y = sum a[i]*b[i], 3 elements), one
// operation per clock with random gaps, in the four configurations of the
// area evaluation: 32-bit and 64-bit main datapath, each with n = 2 (mod 3)
// and n = 3 (mod 7). Operands have a uniformly distributed number of leading
// zeros. Results must appear one clock after in_vld and match a reference
// computed at full precision and truncated to W bits; err must follow two
// clocks later and be 1 exactly when some truncated result differs from its
// true value modulo 2^n - 1 (an overflow). Every configuration must flag at
// least one error, pass at least one clean result and see back-to-back issue.
module tb_sc_inner_prod;
  int checks = 0, failures = 0, done_cnt = 0;
  int cycle = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NCFG = 4;
  localparam int CW[NCFG] = '{32, 32, 64, 64};
  localparam int CN[NCFG] = '{2, 3, 2, 3};

  initial begin
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int W = CW[g];
    localparam int N = CN[g];
    localparam int M = (1 << N) - 1;
    logic in_vld = 0;
    logic [2:0][W-1:0] a = '0, b = '0;
    logic [1*W-1:0] yo;
    logic ov, ev, e;
    sc_inner_prod #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .in_vld(in_vld), .a(a), .b(b),
      .out_vld(ov), .y(yo), .err_vld(ev), .err(e));

    logic [1*W-1:0] y_q[$];
    bit e_q[$];
    int cy_q[$], ce_q[$];
    int n_det = 0, n_clean = 0, n_b2b = 0;

    function automatic logic [W-1:0] rnd();
      logic [63:0] r = {$urandom, $urandom};
      return W'(r >> ((64 - W) + $urandom % (W + 1)));
    endfunction

    always @(posedge clk) if (rst_n) begin
      if (ov) begin
        checks++;
        if (y_q.size() == 0 || yo != y_q[0] || cycle != cy_q[0] + 1) begin
          failures++; $display("W=%0d n=%0d: result mismatch at %0d", W, N, cycle);
        end
        if (y_q.size() != 0) begin void'(y_q.pop_front()); void'(cy_q.pop_front()); end
      end
      if (ev) begin
        checks++;
        if (e_q.size() == 0 || e != e_q[0] || cycle != ce_q[0] + 3) begin
          failures++; $display("W=%0d n=%0d: err mismatch at %0d: %0d", W, N, cycle, e);
        end
        if (e_q.size() != 0) begin void'(e_q.pop_front()); void'(ce_q.pop_front()); end
        if (e) n_det++; else n_clean++;
      end else if (e) begin failures++; $display("err without err_vld"); end
    end

    initial begin
      logic [255:0] full;
      logic [1*W-1:0] yexp;
      bit x;
      bit prev = 0;
      @(posedge rst_n);
      for (int t = 0; t < 1500; t++) begin
        @(negedge clk);
        in_vld = ($urandom % 4) != 0;
        for (int i = 0; i < 3; i++) begin a[i] = rnd(); b[i] = rnd(); end
        if (in_vld) begin
          if (prev) n_b2b++;
          x = 0;
          full = 0;
          for (int i = 0; i < 3; i++) full += 256'(a[i]) * 256'(b[i]);
          x |= (full % 256'(M)) != (256'(full[W-1:0]) % 256'(M));
          yexp[0*W +: W] = full[W-1:0];
          y_q.push_back(yexp);
          e_q.push_back(x);
          cy_q.push_back(cycle);
          ce_q.push_back(cycle);
        end
        prev = in_vld;
      end
      @(negedge clk); in_vld = 0;
      repeat (6) @(negedge clk);
      checks++;
      if (y_q.size() != 0 || e_q.size() != 0 || n_det == 0 || n_clean == 0 || n_b2b == 0) begin
        failures++; $display("W=%0d n=%0d: detected %0d clean %0d b2b %0d left %0d", W, N, n_det, n_clean, n_b2b, y_q.size());
      end
      $display("W=%0d n=%0d: detected=%0d clean=%0d back_to_back=%0d", W, N, n_det, n_clean, n_b2b);
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == NCFG);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
