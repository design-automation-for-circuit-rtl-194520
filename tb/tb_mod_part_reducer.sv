// tb_mod_part_reducer: random check of the partial reducer for a 32-bit
// input with n = 2 (default) and a 20-bit input with n = 3 (padded top
// row). The two output rows must sum to the input modulo 2^n - 1.
module tb_mod_part_reducer;
  int checks = 0, failures = 0;
  logic [31:0] a; logic [1:0][1:0] ra;
  logic [19:0] b; logic [1:0][2:0] rb;
  mod_part_reducer dut_a (.a(a), .rows_o(ra));
  mod_part_reducer #(.N(3), .W(20)) dut_b (.a(b), .rows_o(rb));
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = $urandom >> ($urandom % 32);
      b = 20'($urandom);
      if (t == 0) begin a = '1; b = '1; end
      if (t == 1) begin a = '0; b = '0; end
      #1;
      checks += 2;
      if ((int'(ra[0]) + int'(ra[1])) % 3 != int'(a % 3)) begin failures++; $display("A %0d", a); end
      if ((int'(rb[0]) + int'(rb[1])) % 7 != int'(b % 7)) begin failures++; $display("B %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
