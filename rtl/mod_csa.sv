// mod_csa: carry-save adder modulo 2^n - 1.
//
// Compresses three n-bit rows into a sum row and a carry row with one full
// adder per bit. Because 2^n = 1 (mod 2^n - 1), the carry leaving bit n-1
// re-enters at bit 0, so the carry row is the plain carry vector rotated
// left by one place and s + c = a + b + d (mod 2^n - 1). No carry
// propagates: the delay is one full adder.
//
// The end-around wiring is the standard modulo 2^n - 1 carry-save adder;
// the cell-level structure is not prescribed beyond that.
// Purely combinational.
module mod_csa #(
  parameter int unsigned N = phi_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] d,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);
  logic [N-1:0] cy;

  always_comb begin
    s  = a ^ b ^ d;
    cy = (a & b) | (d & (a | b));
    c  = {cy[N-2:0], cy[N-1]};
  end
endmodule
