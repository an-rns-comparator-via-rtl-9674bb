// p1_row_reducer: first compression stage of the partition number p1(X).
//
// p1(X) = |x1 + ~x3 + 2^n - 2| mod (2^n - 1), still to be reduced by ~p2.
// Folded into n bits, these three terms are the rows
//   a[n-1:0]            (x1)
//   ~c[n-1:0]           (low n bits of the complemented x3)
//   1 1 ... 1 ~c[n]     (constant 2^n - 2 with ~c[n], the weight-2^n bit of
//                        ~x3, moved to bit 0 since 2^n = 1 mod 2^n - 1).
// A full-adder row over them simplifies, because the third row is constant
// in bits 1..n-1, to one XNOR and one OR per bit. Bit 0 is a real full
// adder (XOR3 and majority). Carries move one place up and the carry of
// bit n-1 wraps around to bit 0 (end-around carry), so
//   sum_row[i]   = a[i] XNOR ~c[i]          (i >= 1)
//   sum_row[0]   = a[0] XOR ~c[0] XOR ~c[n]
//   carry_row[i] = a[i-1] OR ~c[i-1]        (i >= 2)
//   carry_row[1] = majority(a[0], ~c[0], ~c[n])
//   carry_row[0] = a[n-1] OR ~c[n-1]
// and sum_row + carry_row = x1 + ~x3 + 2^n - 2 (mod 2^n - 1).
// This follows the bit arrangement given for the design; only the grouping
// into one module is this implementation's.
//
// Purely combinational; requires N >= 2.
module p1_row_reducer #(
  parameter int unsigned N = phi_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x1,
  input  logic [N:0]   x3,
  output logic [N-1:0] sum_row,
  output logic [N-1:0] carry_row
);
  logic [N:0] x3_n;

  always_comb begin
    x3_n = ~x3;
    // bits 1..n-1: third row is a constant 1
    for (int i = 1; i < N; i++) begin
      sum_row[i] = ~(x1[i] ^ x3_n[i]);
    end
    for (int i = 2; i < N; i++) begin
      carry_row[i] = x1[i-1] | x3_n[i-1];
    end
    // bit 0: third row holds ~c[n]
    sum_row[0]   = x1[0] ^ x3_n[0] ^ x3_n[N];
    carry_row[1] = (x1[0] & x3_n[0]) | (x3_n[N] & (x1[0] | x3_n[0]));
    // end-around carry of bit n-1
    carry_row[0] = x1[N-1] | x3_n[N-1];
  end
endmodule
