// tb_mod_zero_cmp: exhaustive check of the two-row zero comparator for
// n = 2, 3 and 4: is_zero must be 1 exactly when a + b is a multiple of
// 2^n - 1.
module tb_mod_zero_cmp;
  int checks = 0, failures = 0;
  logic [1:0] a2, b2; logic z2;
  logic [2:0] a3, b3; logic z3;
  logic [3:0] a4, b4; logic z4;
  mod_zero_cmp          dut2 (.a(a2), .b(b2), .is_zero(z2));
  mod_zero_cmp #(.N(3)) dut3 (.a(a3), .b(b3), .is_zero(z3));
  mod_zero_cmp #(.N(4)) dut4 (.a(a4), .b(b4), .is_zero(z4));
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i); {a3, b3} = 6'(i); {a2, b2} = 4'(i);
      #1;
      checks++;
      if (z4 != ((int'(a4) + int'(b4)) % 15 == 0)) begin failures++; $display("n=4 %0d+%0d z=%0d", a4, b4, z4); end
      if (i < 64) begin
        checks++;
        if (z3 != ((int'(a3) + int'(b3)) % 7 == 0)) begin failures++; $display("n=3 %0d+%0d z=%0d", a3, b3, z3); end
      end
      if (i < 16) begin
        checks++;
        if (z2 != ((int'(a2) + int'(b2)) % 3 == 0)) begin failures++; $display("n=2 %0d+%0d z=%0d", a2, b2, z2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
