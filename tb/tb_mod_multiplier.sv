// tb_mod_multiplier: exhaustive check of y = a * b modulo 2^n - 1 for
// n = 2, 3 and 4.
module tb_mod_multiplier;
  int checks = 0, failures = 0;
  logic [1:0] a2, b2, y2;
  logic [2:0] a3, b3, y3;
  logic [3:0] a4, b4, y4;
  mod_multiplier          dut2 (.a(a2), .b(b2), .y(y2));
  mod_multiplier #(.N(3)) dut3 (.a(a3), .b(b3), .y(y3));
  mod_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .y(y4));
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i); {a3, b3} = 6'(i); {a2, b2} = 4'(i);
      #1;
      checks++;
      if (int'(y4) % 15 != (int'(a4) * int'(b4)) % 15) begin failures++; $display("n=4 %0d*%0d=%0d", a4, b4, y4); end
      if (i < 64) begin
        checks++;
        if (int'(y3) % 7 != (int'(a3) * int'(b3)) % 7) begin failures++; $display("n=3 %0d*%0d=%0d", a3, b3, y3); end
      end
      if (i < 16) begin
        checks++;
        if (int'(y2) % 3 != (int'(a2) * int'(b2)) % 3) begin failures++; $display("n=2 %0d*%0d=%0d", a2, b2, y2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
