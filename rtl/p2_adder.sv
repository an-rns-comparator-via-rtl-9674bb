// p2_adder: section number p2(X) = |x3 - x2| mod 2^n.
//
// Since ~x2 = 2^n - 1 - x2, the subtraction is the n-bit sum
// x3[n-1:0] + ~x2 + 1 with the carry out dropped (equation for w). Bit n of
// x3 has weight 2^n and drops out modulo 2^n, so only the low n bits of x3
// are an input here (port x3_lo), as in the generator's block diagram.
// The constant 1 enters as the
// carry-in, which does the job of the carry-save stage that adds the
// constant 1 ahead of the adder in the generator's block diagram.
//
// Purely combinational.
module p2_adder #(
  parameter int unsigned N = phi_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x2,
  input  logic [N-1:0] x3_lo,
  output logic [N-1:0] w
);
  always_comb begin
    w = x3_lo + ~x2 + N'(1);
  end
endmodule
