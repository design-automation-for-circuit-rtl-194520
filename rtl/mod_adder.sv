// mod_adder: n-bit Mersenne modulo adder, y = a + b (mod 2^n - 1).
//
// Two ripple stages. The first is an ordinary n-bit ripple-carry adder (a
// half adder at bit 0, full adders above). Its carry out has weight 2^n,
// which is 1 modulo M, so it is fed back in at bit 0 of the second stage: a
// chain of half adders that adds this single bit to the first-stage sum.
// The carry can never ripple past the most significant bit of the second
// stage (at most one of its two inputs is 1), so that bit is a "quarter
// adder", a plain OR gate, and no carry leaves the adder. Inputs and output
// use the non-normalized encoding: zero may appear as all zeros or all ones.
// Combinational; about 2n gate delays.
module mod_adder #(
  parameter int N = 2  // residue width n (n >= 2)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);

  logic [N-1:0] s1;  // first-stage sum
  logic [N-1:0] c1;  // first-stage carries, c1[N-1] is the end-around carry
  logic [N-2:0] c2;  // second-stage carries

  // stage 1: ripple-carry adder
  assign s1[0] = a[0] ^ b[0];
  assign c1[0] = a[0] & b[0];
  for (genvar i = 1; i < N; i++) begin : g_rca
    assign s1[i] = a[i] ^ b[i] ^ c1[i-1];
    assign c1[i] = (a[i] & b[i]) | (a[i] & c1[i-1]) | (b[i] & c1[i-1]);
  end

  // stage 2: half-adder chain with the wrapped carry, quarter adder on top
  assign y[0]  = s1[0] ^ c1[N-1];
  assign c2[0] = s1[0] & c1[N-1];
  for (genvar i = 1; i < N - 1; i++) begin : g_ha
    assign y[i]  = s1[i] ^ c2[i-1];
    assign c2[i] = s1[i] & c2[i-1];
  end
  assign y[N-1] = s1[N-1] | c2[N-2];

endmodule
