// mersenne_pkg: elaboration-time helpers shared by the Mersenne modulo
// functional units.
//
// All units work on residues modulo M(n) = 2^n - 1 held in n bits, where the
// all-ones word is a second encoding of zero ("-0"). Because 2^n = 1 (mod M),
// any bit of weight 2^i may be moved to weight 2^(i mod n); a w-bit integer is
// therefore a stack of ceil(w/n) n-bit rows whose sum is congruent to it.
// Rows are reduced three at a time by rows of full adders (a carry-save or
// Wallace-style step) until two rows are left. The functions below give the
// number of rows after each such step so generate loops can size themselves.
package mersenne_pkg;

  // ceil(a / b) for positive b
  function automatic int ceil_div(int a, int b);
    return (a + b - 1) / b;
  endfunction

  // rows left after one full-adder step on r rows: each triplet becomes two
  function automatic int rows_next(int r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // rows left after s steps starting from r rows
  function automatic int rows_after(int r, int s);
    int x = r;
    for (int i = 0; i < s; i++) x = rows_next(x);
    return x;
  endfunction

  // number of full-adder steps needed to bring r rows down to at most two
  function automatic int num_stages(int r);
    int x = r;
    int s = 0;
    while (x >= 3) begin
      x = rows_next(x);
      s++;
    end
    return s;
  endfunction

endpackage
