// tb_sc_mac_pipe: streams random multiply-accumulates through the pipelined
// self-checking MAC (one per clock with random gaps). Checks y one clock
// after in_vld, err two clocks after y, and err against a residue model of
// the truncated result; overflowing results must be flagged. Instances:
// n = 2 (default) and n = 3.
module tb_sc_mac_pipe;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic        in_vld;
  logic [31:0] a, b, c, y2, y3;
  logic        ov2, ev2, e2, ov3, ev3, e3;
  sc_mac_pipe dut2 (.clk(clk), .rst_n(rst_n), .in_vld(in_vld), .a(a), .b(b), .c(c),
                    .out_vld(ov2), .y(y2), .err_vld(ev2), .err(e2));
  sc_mac_pipe #(.N(3), .W(32)) dut3 (.clk(clk), .rst_n(rst_n), .in_vld(in_vld), .a(a), .b(b), .c(c),
                    .out_vld(ov3), .y(y3), .err_vld(ev3), .err(e3));

  logic [31:0] y_q[$];
  bit          e2_q[$], e3_q[$];
  int          cy_q[$], ce_q[$];
  int          n_det = 0, n_clean = 0, n_b2b = 0;

  function automatic logic [31:0] rnd();
    return $urandom >> ($urandom % 33);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ov2) begin
      checks++;
      if (y_q.size() == 0 || y2 != y_q[0] || y3 != y_q[0] || cycle != cy_q[0] + 1) begin
        failures++; $display("y mismatch at %0d", cycle);
      end
      if (y_q.size() != 0) begin void'(y_q.pop_front()); void'(cy_q.pop_front()); end
    end
    if (ev2 != ev3 || ov2 != ov3) begin failures++; $display("valid mismatch"); end
    if (ev2) begin
      checks++;
      if (e2_q.size() == 0 || e2 != e2_q[0] || e3 != e3_q[0] || cycle != ce_q[0] + 3) begin
        failures++; $display("err mismatch at %0d: %0d %0d", cycle, e2, e3);
      end
      if (e2_q.size() != 0) begin void'(e2_q.pop_front()); void'(e3_q.pop_front()); void'(ce_q.pop_front()); end
      if (e2) n_det++; else n_clean++;
    end else if (e2 || e3) begin failures++; $display("err without err_vld"); end
  end

  initial begin
    logic [95:0] full;
    bit prev = 0;
    in_vld = 0; a = 0; b = 0; c = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_vld = ($urandom % 4) != 0;
      a = rnd(); b = rnd(); c = rnd();
      if (in_vld) begin
        if (prev) n_b2b++;
        full = 96'(a) * 96'(b) + 96'(c);
        y_q.push_back(full[31:0]);
        cy_q.push_back(cycle);
        ce_q.push_back(cycle);
        e2_q.push_back((full % 3) != 96'(full[31:0] % 3));
        e3_q.push_back((full % 7) != 96'(full[31:0] % 7));
      end
      prev = in_vld;
    end
    @(negedge clk); in_vld = 0;
    repeat (6) @(negedge clk);
    checks += 2;
    if (y_q.size() != 0 || e2_q.size() != 0) begin failures++; $display("missing results"); end
    if (n_det == 0 || n_clean == 0 || n_b2b == 0) begin failures++; $display("a mechanism never happened"); end
    $display("detected=%0d clean=%0d back_to_back=%0d", n_det, n_clean, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
