// tb_mod_row_reduce: random check of the full-adder row tree. Stacks of
// 16 rows of 2 bits (default), 7 rows of 3 bits and 1 row of 3 bits are
// reduced; the two output rows must sum to the stack sum modulo 2^n - 1.
module tb_mod_row_reduce;
  int checks = 0, failures = 0;
  logic [15:0][1:0] ra; logic [1:0][1:0] oa;
  logic [6:0][2:0]  rb; logic [1:0][2:0] ob;
  logic [0:0][2:0]  rc; logic [1:0][2:0] oc;
  mod_row_reduce dut_a (.rows_i(ra), .rows_o(oa));
  mod_row_reduce #(.N(3), .ROWS(7)) dut_b (.rows_i(rb), .rows_o(ob));
  mod_row_reduce #(.N(3), .ROWS(1)) dut_c (.rows_i(rc), .rows_o(oc));
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sa, sb;
    for (int t = 0; t < 2000; t++) begin
      ra = {$urandom, $urandom} & 32'hffffffff;
      rb = 21'($urandom);
      rc = 3'($urandom);
      if (t == 0) begin ra = '1; rb = '1; end
      #1;
      sa = 0; for (int r = 0; r < 16; r++) sa += int'(ra[r]);
      sb = 0; for (int r = 0; r < 7; r++) sb += int'(rb[r]);
      checks += 3;
      if ((int'(oa[0]) + int'(oa[1])) % 3 != sa % 3) begin failures++; $display("A: sum %0d -> %0d+%0d", sa, oa[0], oa[1]); end
      if ((int'(ob[0]) + int'(ob[1])) % 7 != sb % 7) begin failures++; $display("B: sum %0d -> %0d+%0d", sb, ob[0], ob[1]); end
      if (oc[0] != rc[0] || oc[1] != 0) begin failures++; $display("C mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
