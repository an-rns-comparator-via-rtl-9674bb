// phi_comparator: magnitude comparator for two residue numbers in the
// moduli set {2^n-1, 2^n, 2^(n+1)-1} by dynamic range partitioning.
//
// The dynamic range M = (2^n-1) 2^n (2^(n+1)-1) is split into 2^n-1
// partitions of 2^n (2^(n+1)-1) values, each split into 2^n sections of
// 2^(n+1)-1 values; the offset inside a section is the residue x3 itself.
// One drp_generator per operand yields the partition number p1 and the
// section number p2. Three binary comparators then compare p1(X)/p1(Y),
// p2(X)/p2(Y) and x3/y3 in parallel, and a two-level multiplexer picks the
// most significant stage that differs: c_xy = E1 ? (E2 ? c3 : c2) : c1.
// E = E1 & E2 & E3 flags X == Y.
//
// Interface: residues x1, x2 (n bits) and x3 (n+1 bits) of X, likewise of
// Y, all canonical. c_xy = 1 when X > Y; e = 1 when X == Y (c_xy is then 0).
// The structure is that of the design's top-level block diagram; the
// polarity of c_xy (greater-than) and the n+1-bit width of the third
// comparator, which x3 needs, are this implementation's.
// Purely combinational: the result is valid one propagation delay after the
// inputs settle.
module phi_comparator #(
  parameter int unsigned N = phi_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  input  logic [N:0]   x3,
  input  logic [N-1:0] y1,
  input  logic [N-1:0] y2,
  input  logic [N:0]   y3,
  output logic         c_xy,
  output logic         e
);
  logic [N-1:0] p1_x, p2_x, p1_y, p2_y;
  logic         c1, c2, c3;
  logic         e1, e2, e3;

  drp_generator #(.N(N)) u_gen_x (
    .x1 (x1), .x2 (x2), .x3 (x3),
    .p1 (p1_x), .p2 (p2_x)
  );

  drp_generator #(.N(N)) u_gen_y (
    .x1 (y1), .x2 (y2), .x3 (y3),
    .p1 (p1_y), .p2 (p2_y)
  );

  binary_comparator #(.W(N)) u_cmp1 (
    .a (p1_x), .b (p1_y), .gt (c1), .eq (e1)
  );

  binary_comparator #(.W(N)) u_cmp2 (
    .a (p2_x), .b (p2_y), .gt (c2), .eq (e2)
  );

  binary_comparator #(.W(N+1)) u_cmp3 (
    .a (x3), .b (y3), .gt (c3), .eq (e3)
  );

  always_comb begin
    c_xy = e1 ? (e2 ? c3 : c2) : c1;
    e    = e1 & e2 & e3;
  end
endmodule
