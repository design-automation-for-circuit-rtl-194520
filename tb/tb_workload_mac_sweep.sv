// tb_workload_mac_sweep: the pipelined self-checking MAC at every main
// datapath width and residue width of the MAC evaluation: 8-bit with
// n = 2..4 and 16, 32 and 64-bit with n = 2..8 (24 configurations).
// Each configuration gets its own stream of operands with a uniformly
// distributed number of leading zeros and is checked like tb_sc_mac_pipe:
// result one clock after in_vld, err two clocks later, err equal to the
// residue model of the truncated result. Every configuration must flag at
// least one overflow and pass at least one clean result.
module tb_workload_mac_sweep;
  int checks = 0, failures = 0, done_cnt = 0;
  int cycle = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NW = 4;
  localparam int WIDTHS[NW] = '{8, 16, 32, 64};

  initial begin
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar wi = 0; wi < NW; wi++) begin : g_w
    localparam int W = WIDTHS[wi];
    for (genvar n = 2; n <= 8; n++) begin : g_n
      if (2 * n <= W) begin : g_cfg
        localparam longint unsigned M = (64'd1 << n) - 1;
        logic         in_vld = 0;
        logic [W-1:0] a = '0, b = '0, c = '0, y;
        logic         ov, ev, e;
        logic [W-1:0] y_q[$];
        bit           e_q[$];
        int           cy_q[$];
        int           n_det = 0, n_clean = 0;

        sc_mac_pipe #(.N(n), .W(W)) dut (.clk(clk), .rst_n(rst_n), .in_vld(in_vld),
          .a(a), .b(b), .c(c), .out_vld(ov), .y(y), .err_vld(ev), .err(e));

        function automatic logic [W-1:0] rnd();
          logic [63:0] r = {$urandom, $urandom};
          return W'(r >> ((64 - W) + $urandom % (W + 1)));
        endfunction

        always @(posedge clk) if (rst_n) begin
          if (ov) begin
            checks++;
            if (y_q.size() == 0 || y != y_q[0]) begin failures++; $display("W=%0d n=%0d: y mismatch", W, n); end
            if (y_q.size() != 0) void'(y_q.pop_front());
          end
          if (ev) begin
            checks++;
            if (e_q.size() == 0 || e != e_q[0] || cycle != cy_q[0] + 3) begin
              failures++; $display("W=%0d n=%0d: err mismatch", W, n);
            end
            if (e_q.size() != 0) begin void'(e_q.pop_front()); void'(cy_q.pop_front()); end
            if (e) n_det++; else n_clean++;
          end
        end

        initial begin
          logic [191:0] full;
          @(posedge rst_n);
          for (int t = 0; t < 1000; t++) begin
            @(negedge clk);
            in_vld = ($urandom % 4) != 0;
            a = rnd(); b = rnd(); c = rnd();
            if (in_vld) begin
              full = 192'(a) * 192'(b) + 192'(c);
              y_q.push_back(full[W-1:0]);
              e_q.push_back((full % 192'(M)) != (192'(full[W-1:0]) % 192'(M)));
              cy_q.push_back(cycle);
            end
          end
          @(negedge clk); in_vld = 0;
          repeat (6) @(negedge clk);
          checks++;
          if (y_q.size() != 0 || e_q.size() != 0 || n_det == 0 || n_clean == 0) begin
            failures++; $display("W=%0d n=%0d: detected %0d clean %0d left %0d", W, n, n_det, n_clean, y_q.size());
          end
          done_cnt++;
        end
      end
    end
  end

  initial begin
    wait (done_cnt == 24);
    #1;
    $display("configurations run: %0d", done_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
