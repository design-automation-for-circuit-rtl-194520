// tb_mod_subtractor: exhaustive check of y = a - b modulo 2^n - 1 for
// n = 2, 3 and 5.
module tb_mod_subtractor;
  int checks = 0, failures = 0;
  logic [1:0] a2, b2, y2;
  logic [2:0] a3, b3, y3;
  logic [4:0] a5, b5, y5;
  mod_subtractor          dut2 (.a(a2), .b(b2), .y(y2));
  mod_subtractor #(.N(3)) dut3 (.a(a3), .b(b3), .y(y3));
  mod_subtractor #(.N(5)) dut5 (.a(a5), .b(b5), .y(y5));
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i); {a3, b3} = 6'(i); {a2, b2} = 4'(i);
      #1;
      checks++;
      if (int'(y5) % 31 != (int'(a5) - int'(b5) + 31) % 31) begin failures++; $display("n=5 %0d-%0d=%0d", a5, b5, y5); end
      if (i < 64) begin
        checks++;
        if (int'(y3) % 7 != (int'(a3) - int'(b3) + 7) % 7) begin failures++; $display("n=3 %0d-%0d=%0d", a3, b3, y3); end
      end
      if (i < 16) begin
        checks++;
        if (int'(y2) % 3 != (int'(a2) - int'(b2) + 3) % 3) begin failures++; $display("n=2 %0d-%0d=%0d", a2, b2, y2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
