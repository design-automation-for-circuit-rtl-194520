// tb_mod_pp_matrix: exhaustive check of the wrapped partial-product array
// for n = 2 and n = 3, AND and NAND variants: the rows must sum to a*b
// (AND) or -(a*b) (NAND) modulo 2^n - 1.
module tb_mod_pp_matrix;
  int checks = 0, failures = 0;
  logic [1:0] a2, b2; logic [1:0][1:0] p2, q2;
  logic [2:0] a3, b3; logic [2:0][2:0] p3, q3;
  mod_pp_matrix                             dut_p2 (.a(a2), .b(b2), .pp(p2));
  mod_pp_matrix #(.N(2), .NEGATE(1'b1))     dut_q2 (.a(a2), .b(b2), .pp(q2));
  mod_pp_matrix #(.N(3))                    dut_p3 (.a(a3), .b(b3), .pp(p3));
  mod_pp_matrix #(.N(3), .NEGATE(1'b1))     dut_q3 (.a(a3), .b(b3), .pp(q3));
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sp, sq, pr;
    for (int i = 0; i < 64; i++) begin
      {a3, b3} = 6'(i); {a2, b2} = 4'(i);
      #1;
      sp = 0; sq = 0; for (int j = 0; j < 3; j++) begin sp += int'(p3[j]); sq += int'(q3[j]); end
      pr = int'(a3) * int'(b3);
      checks += 2;
      if (sp % 7 != pr % 7) begin failures++; $display("n=3 AND %0d*%0d", a3, b3); end
      if ((sq + pr) % 7 != 0) begin failures++; $display("n=3 NAND %0d*%0d", a3, b3); end
      if (i < 16) begin
        sp = int'(p2[0]) + int'(p2[1]); sq = int'(q2[0]) + int'(q2[1]);
        pr = int'(a2) * int'(b2);
        checks += 2;
        if (sp % 3 != pr % 3) begin failures++; $display("n=2 AND %0d*%0d", a2, b2); end
        if ((sq + pr) % 3 != 0) begin failures++; $display("n=2 NAND %0d*%0d", a2, b2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
