// mod_fa_row: one "n x FA" block of the Mersenne modulo reducer.
//
// Takes three n-bit residue rows x, y, z and returns two rows s and c whose
// sum is congruent to x + y + z modulo M = 2^n - 1. Bit i of the three rows
// goes through one full adder; its sum bit stays at weight 2^i in s, its
// carry (weight 2^(i+1)) goes to bit i+1 of c. The carry of the most
// significant adder has weight 2^n = 1 (mod M), so it wraps round to bit 0 of
// c. The outputs are thus two ordinary residue rows, not a sum word and a
// carry word. Purely combinational; n full adders, nothing else.
module mod_fa_row #(
  parameter int N = 2  // residue width n, modulo base 2^n - 1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,  // sum row
  output logic [N-1:0] c   // carry row, rotated left by one with wrap-around
);

  logic [N-1:0] carry;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      s[i]     = x[i] ^ y[i] ^ z[i];
      carry[i] = (x[i] & y[i]) | (x[i] & z[i]) | (y[i] & z[i]);
    end
    c = {carry[N-2:0], carry[N-1]};
  end

endmodule
