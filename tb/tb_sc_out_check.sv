// tb_sc_out_check: drives the output checker with random claims, about half
// of them corrupted, and checks err against a residue model and that
// err_vld follows vld_i by exactly two clocks. Two instances: the default
// (n = 2, one product) and n = 3 with two products and one addend row.
module tb_sc_out_check;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // default instance
  logic        v1;  logic [31:0] y1; logic [0:0][1:0] x1, z1; logic ev1, e1;
  // n = 3, two terms, one extra row
  logic        v2;  logic [31:0] y2; logic [1:0][2:0] x2, z2; logic [0:0][2:0] ad2; logic ev2, e2;

  sc_out_check dut1 (.clk(clk), .rst_n(rst_n), .vld_i(v1), .y_i(y1), .rx_i(x1), .rz_i(z1),
                     .add_i('0), .err_vld(ev1), .err(e1));
  sc_out_check #(.N(3), .W(32), .TERMS(2), .EXTRA(1)) dut2 (
    .clk(clk), .rst_n(rst_n), .vld_i(v2), .y_i(y2), .rx_i(x2), .rz_i(z2),
    .add_i(ad2), .err_vld(ev2), .err(e2));

  bit exp1_q[$], exp2_q[$];
  int cyc1_q[$], cyc2_q[$];
  int n_err1 = 0, n_err2 = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference: does y match the residue claim?
  always @(posedge clk) if (rst_n) begin
    if (ev1) begin
      checks++;
      if (exp1_q.size() == 0 || e1 != exp1_q[0] || cycle != cyc1_q[0] + 2) begin
        failures++; $display("chk1 mismatch at cycle %0d err=%0d", cycle, e1);
      end
      if (exp1_q.size() != 0) begin void'(exp1_q.pop_front()); void'(cyc1_q.pop_front()); end
      if (e1) n_err1++;
    end else if (e1) begin failures++; $display("chk1 err without err_vld"); end
    if (ev2) begin
      checks++;
      if (exp2_q.size() == 0 || e2 != exp2_q[0] || cycle != cyc2_q[0] + 2) begin
        failures++; $display("chk2 mismatch at cycle %0d err=%0d", cycle, e2);
      end
      if (exp2_q.size() != 0) begin void'(exp2_q.pop_front()); void'(cyc2_q.pop_front()); end
      if (e2) n_err2++;
    end
  end

  initial begin
    longint unsigned ref1, ref2;
    int unsigned xv, zv, xw, zw, av;
    v1 = 0; v2 = 0; y1 = 0; y2 = 0; x1 = '0; z1 = '0; x2 = '0; z2 = '0; ad2 = '0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      v1 = ($urandom % 4) != 0;
      v2 = v1;
      // instance 1: y claims x*z (mod 3)
      xv = $urandom % 4; zv = $urandom % 4;
      x1[0] = 2'(xv); z1[0] = 2'(zv);
      y1 = $urandom;
      if ($urandom % 2) y1 = 32'(y1 - (y1 % 3) + (xv * zv) % 3);   // consistent claim
      // instance 2: y claims x0*z0 + x1*z1 + a, with -a given as the extra row
      xv = $urandom % 8; zv = $urandom % 8; xw = $urandom % 8; zw = $urandom % 8; av = $urandom % 8;
      x2[0] = 3'(xv); z2[0] = 3'(zv); x2[1] = 3'(xw); z2[1] = 3'(zw); ad2[0] = ~3'(av);
      y2 = $urandom;
      if ($urandom % 2) y2 = 32'(y2 - (y2 % 7) + (xv * zv + xw * zw + av) % 7);
      ref1 = 64'(y1); ref2 = 64'(y2);
      if (v1) begin
        exp1_q.push_back((ref1 % 3) != 64'((int'(x1[0]) * int'(z1[0])) % 3));
        cyc1_q.push_back(cycle);
        exp2_q.push_back((ref2 % 7) != 64'((xv * zv + xw * zw + av) % 7));
        cyc2_q.push_back(cycle);
      end
    end
    @(negedge clk); v1 = 0; v2 = 0;
    repeat (5) @(negedge clk);
    checks += 3;
    if (exp1_q.size() != 0 || exp2_q.size() != 0) begin failures++; $display("missing results"); end
    if (n_err1 == 0 || n_err2 == 0) begin failures++; $display("no error ever flagged"); end
    $display("errors flagged: %0d / %0d", n_err1, n_err2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
