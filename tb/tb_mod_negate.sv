// tb_mod_negate: exhaustive check of residue negation for n = 2 and n = 4:
// a + (-a) must be 0 modulo 2^n - 1 and -0 must map to 0 and back.
module tb_mod_negate;
  int checks = 0, failures = 0;
  logic [1:0] a2, y2;
  logic [3:0] a4, y4;
  mod_negate          dut2 (.a(a2), .y(y2));
  mod_negate #(.N(4)) dut4 (.a(a4), .y(y4));
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      a4 = 4'(i); a2 = 2'(i);
      #1;
      checks += 2;
      if ((int'(a4) + int'(y4)) % 15 != 0) begin failures++; $display("n=4 -%0d=%0d", a4, y4); end
      if ((int'(a2) + int'(y2)) % 3 != 0) begin failures++; $display("n=2 -%0d=%0d", a2, y2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
