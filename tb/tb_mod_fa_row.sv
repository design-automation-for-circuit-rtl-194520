// tb_mod_fa_row: random check of the wrap-around full-adder row for n = 2
// and n = 4. The sum row must be the bitwise XOR of the inputs and the two
// output rows must sum to x + y + z modulo 2^n - 1.
module tb_mod_fa_row;
  int checks = 0, failures = 0;
  logic [1:0] x2, y2, z2, s2, c2;
  logic [3:0] x4, y4, z4, s4, c4;
  mod_fa_row #(.N(2)) dut2 (.x(x2), .y(y2), .z(z2), .s(s2), .c(c2));
  mod_fa_row #(.N(4)) dut4 (.x(x4), .y(y4), .z(z4), .s(s4), .c(c4));
  initial begin
    #100000; failures++; $display("watchdog"); 
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      {x2, y2, z2} = 6'(i);
      #1;
      checks++;
      if ((int'(s2) + int'(c2)) % 3 != (int'(x2) + int'(y2) + int'(z2)) % 3 || s2 != (x2 ^ y2 ^ z2)) begin
        failures++; $display("n=2 mismatch x=%0d y=%0d z=%0d s=%0d c=%0d", x2, y2, z2, s2, c2);
      end
    end
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      #1;
      checks++;
      if ((int'(s4) + int'(c4)) % 15 != (int'(x4) + int'(y4) + int'(z4)) % 15 || s4 != (x4 ^ y4 ^ z4)) begin
        failures++; $display("n=4 mismatch x=%0d y=%0d z=%0d s=%0d c=%0d", x4, y4, z4, s4, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
