// tb_workload_fault_injection: single-bit upsets in the pipelined
// self-checking MAC (32-bit, n = 2 and n = 5).
//
// For each experiment one operation with a non-overflowing random input
// (a uniformly distributed number of leading zeros) is issued alone, and one
// register bit is inverted for exactly the clock in which its value is used:
// a bit of the main result register y, of the a/b residue registers, of the
// negated-c residue rows or of the stage-2 row register. An experiment is
// "masked" when y is right and err stays 0, "detected" when err is 1 (a "false alarm" if y is right) and a
// "failure" when y is wrong and err stays 0. A flip of a result bit changes y
// by 2^k, never a multiple of 2^n - 1, so such flips must all be detected;
// shadow flips leave y right and may only raise err (a false alarm). The
// testbench counts each outcome and fails on any undetected wrong result.
module tb_workload_fault_injection;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic        in_vld = 0;
  logic [31:0] a = 0, b = 0, c = 0, y2, y5;
  logic        ov2, ev2, e2, ov5, ev5, e5;
  sc_mac_pipe dut2 (.clk(clk), .rst_n(rst_n), .in_vld(in_vld), .a(a), .b(b), .c(c),
                    .out_vld(ov2), .y(y2), .err_vld(ev2), .err(e2));
  sc_mac_pipe #(.N(5), .W(32)) dut5 (.clk(clk), .rst_n(rst_n), .in_vld(in_vld), .a(a), .b(b), .c(c),
                    .out_vld(ov5), .y(y5), .err_vld(ev5), .err(e5));

  // outcome counts per design [0] = n 2, [1] = n 5; per site class
  int n_masked[2], n_detected[2], n_failed[2], n_base_fail[2], n_false[2];

  function automatic logic [31:0] rnd();
    return $urandom >> ($urandom % 33);
  endfunction

  initial begin
    #10000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [95:0] full;
    logic [31:0] yr2, yr5;
    bit          er2, er5;
    int          site, bitn;
    logic [31:0] fy2, fy5;
    logic [1:0]  fr2;
    logic [4:0]  fr5;
    logic [3:0]  fc2;
    logic [9:0]  fc5;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      // operands that do not overflow 32 bits
      do begin
        a = rnd(); b = rnd(); c = rnd();
        full = 96'(a) * 96'(b) + 96'(c);
      end while (full[95:32] != 0);
      site = $urandom % 5;
      @(negedge clk); in_vld = 1;
      @(negedge clk); in_vld = 0;
      // now y, the residue registers and the c rows hold this operation
      case (site)
        0: begin
          bitn = $urandom % 32;
          fy2 = dut2.y ^ (32'd1 << bitn); fy5 = dut5.y ^ (32'd1 << bitn);
          force dut2.y = fy2; force dut5.y = fy5;
        end
        1: begin
          fr2 = dut2.ra_q ^ 2'(1 << ($urandom % 2)); fr5 = dut5.ra_q ^ 5'(1 << ($urandom % 5));
          force dut2.ra_q = fr2; force dut5.ra_q = fr5;
        end
        2: begin
          fr2 = dut2.rb_q ^ 2'(1 << ($urandom % 2)); fr5 = dut5.rb_q ^ 5'(1 << ($urandom % 5));
          force dut2.rb_q = fr2; force dut5.rb_q = fr5;
        end
        3: begin
          fc2 = dut2.nrc_q ^ 4'(1 << ($urandom % 4)); fc5 = dut5.nrc_q ^ 10'(1 << ($urandom % 10));
          force dut2.nrc_q = fc2; force dut5.nrc_q = fc5;
        end
        default: ;
      endcase
      #1;
      yr2 = y2; yr5 = y5;
      @(negedge clk);
      case (site)
        0: begin release dut2.y; release dut5.y; end
        1: begin release dut2.ra_q; release dut5.ra_q; end
        2: begin release dut2.rb_q; release dut5.rb_q; end
        3: begin release dut2.nrc_q; release dut5.nrc_q; end
        default: begin
          fc2 = dut2.u_chk.rows2_q ^ 4'(1 << ($urandom % 4)); fc5 = dut5.u_chk.rows2_q ^ 10'(1 << ($urandom % 10));
          force dut2.u_chk.rows2_q = fc2; force dut5.u_chk.rows2_q = fc5;
        end
      endcase
      @(negedge clk);
      if (site == 4) begin release dut2.u_chk.rows2_q; release dut5.u_chk.rows2_q; end
      // err of this operation is now registered
      er2 = e2; er5 = e5;
      checks += 2;
      if (!ev2 || !ev5) begin failures++; $display("err_vld missing"); end
      if (yr2 != full[31:0]) n_base_fail[0]++;
      if (yr5 != full[31:0]) n_base_fail[1]++;
      if (er2 && yr2 == full[31:0]) n_false[0]++;
      if (er5 && yr5 == full[31:0]) n_false[1]++;
      if (er2) n_detected[0]++; else if (yr2 == full[31:0]) n_masked[0]++; else n_failed[0]++;
      if (er5) n_detected[1]++; else if (yr5 == full[31:0]) n_masked[1]++; else n_failed[1]++;
      @(negedge clk);
    end
    checks += 3;
    if (n_failed[0] != 0 || n_failed[1] != 0) begin failures++; $display("undetected wrong results"); end
    if (n_base_fail[0] == 0 || n_detected[0] == 0 || n_masked[0] == 0) begin failures++; $display("an outcome never occurred"); end
    if (n_base_fail[1] == 0 || n_detected[1] == 0 || n_masked[1] == 0) begin failures++; $display("an outcome never occurred (n=5)"); end
    for (int d = 0; d < 2; d++)
      $display("n=%0d: wrong results %0d, err raised %0d (of which false alarms %0d), masked %0d, undetected failures %0d",
               d == 0 ? 2 : 5, n_base_fail[d], n_detected[d], n_false[d], n_masked[d], n_failed[d]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
