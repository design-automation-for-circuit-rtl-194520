// tb_sc_mac: random check of the combinational self-checking MAC. Operands
// are drawn with a uniformly distributed number of leading zeros, so both
// small results and results that overflow 32 bits occur. y must equal
// (a*b + c) mod 2^32, and err must be 1 exactly when the truncated result
// differs from the true one modulo 2^n - 1. Instances: n = 2 (default) and
// n = 5.
module tb_sc_mac;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, y2, y5;
  logic e2, e5;
  int n_det = 0, n_clean = 0;
  sc_mac                   dut2 (.a(a), .b(b), .c(c), .y(y2), .err(e2));
  sc_mac #(.N(5), .W(32))  dut5 (.a(a), .b(b), .c(c), .y(y5), .err(e5));

  function automatic logic [31:0] rnd();
    return $urandom >> ($urandom % 33);
  endfunction

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [95:0] full;
    bit x2, x5;
    for (int t = 0; t < 4000; t++) begin
      a = rnd(); b = rnd(); c = rnd();
      #1;
      full = 96'(a) * 96'(b) + 96'(c);
      x2 = (full % 3) != 96'(y2 % 3);
      x5 = (full % 31) != 96'(y5 % 31);
      checks += 4;
      if (y2 != full[31:0] || y5 != full[31:0]) begin failures++; $display("y mismatch"); end
      if (e2 != x2) begin failures++; $display("n=2 err=%0d exp=%0d a=%0d b=%0d c=%0d", e2, x2, a, b, c); end
      if (e5 != x5) begin failures++; $display("n=5 err=%0d exp=%0d", e5, x5); end
      if (e2) n_det++; else n_clean++;
    end
    checks++;
    if (n_det == 0 || n_clean == 0) begin failures++; $display("error path or clean path never exercised"); end
    $display("detected=%0d clean=%0d", n_det, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
