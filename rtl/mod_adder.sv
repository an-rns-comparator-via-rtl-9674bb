// mod_adder: adder modulo 2^n - 1 with a canonical result.
//
// Returns s = |a + b| mod (2^n - 1) in the range 0 .. 2^n - 2. Either input
// may be the all-ones word, the second code of zero in one's-complement
// arithmetic. The adder computes t = a + b + 1 in n+1 bits. If t overflows
// n bits, a + b >= 2^n - 1 and the result is the low n bits of t
// (a + b - (2^n - 1)); otherwise the result is a + b. This is an end-around
// carry adder whose carry-in is the carry-out of a + b + 1. Only when both
// inputs are all-ones (a + b = 2 (2^n - 1)) does that still leave the
// all-ones word, and a final zero fold maps it to 0. That matters here: p1
// drives a magnitude comparator, so zero must have exactly one code.
//
// Only the function of this adder is given by the design; the
// select-between-two-sums structure is this implementation's choice.
// Purely combinational.
module mod_adder #(
  parameter int unsigned N = phi_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N:0] t0;   // a + b
  logic [N:0] t1;   // a + b + 1
  logic [N-1:0] r;

  always_comb begin
    t0 = {1'b0, a} + {1'b0, b};
    t1 = t0 + 1'b1;
    r  = t1[N] ? t1[N-1:0] : t0[N-1:0];
    s  = (&r) ? '0 : r;
  end
endmodule
