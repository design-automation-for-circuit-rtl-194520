// tb_mod_reducer: random check of the full reducer y = a mod (2^n - 1) for
// a 32-bit input with n = 2 (default), 32 bits with n = 3 and 16 bits with
// n = 8. Either encoding of zero is accepted.
module tb_mod_reducer;
  int checks = 0, failures = 0;
  logic [31:0] a, b; logic [15:0] c;
  logic [1:0] ya; logic [2:0] yb; logic [7:0] yc;
  mod_reducer dut_a (.a(a), .y(ya));
  mod_reducer #(.N(3), .W(32)) dut_b (.a(b), .y(yb));
  mod_reducer #(.N(8), .W(16)) dut_c (.a(c), .y(yc));
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = $urandom >> ($urandom % 32);
      b = $urandom;
      c = 16'($urandom);
      if (t == 0) begin a = '1; b = '1; c = '1; end
      if (t == 1) begin a = 0; b = 0; c = 0; end
      #1;
      checks += 3;
      if (int'(ya) % 3 != int'(a % 3)) begin failures++; $display("A %0d -> %0d", a, ya); end
      if (int'(yb) % 7 != int'(b % 7)) begin failures++; $display("B %0d -> %0d", b, yb); end
      if (int'(yc) % 255 != int'(c % 255)) begin failures++; $display("C %0d -> %0d", c, yc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
