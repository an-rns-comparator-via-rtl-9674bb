// drp_generator: partition number p1(X) and section number p2(X) of one
// operand X = (x1, x2, x3) in the moduli set {2^n-1, 2^n, 2^(n+1)-1}.
//
// Dynamic range partitioning writes every X in [0, M) as
//   X = x3 + (2^(n+1)-1) * p2 + 2^n (2^(n+1)-1) * p1,
// with p1 in [0, 2^n-1), p2 in [0, 2^n) and x3 in [0, 2^(n+1)-1), so X
// orders like the triple (p1, p2, x3). With the multiplicative inverses
// worked out this becomes
//   p2 = w = |x3 - x2| mod 2^n
//   p1 = |x1 + ~x3 + ~w + 2^n - 2| mod (2^n - 1).
// The datapath follows the block diagram of the generator: p2_adder forms w;
// p1_row_reducer reduces the three fixed rows of p1 to two with XNOR/OR
// arrays; mod_csa adds ~w as the fourth row; mod_adder resolves the last two
// rows into the canonical p1. p2 is thus a by-product that p1 also uses.
//
// Inputs must be canonical residues (x1 <= 2^n-2, x3 <= 2^(n+1)-2).
// Purely combinational.
module drp_generator #(
  parameter int unsigned N = phi_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  input  logic [N:0]   x3,
  output logic [N-1:0] p1,
  output logic [N-1:0] p2
);
  logic [N-1:0] w;
  logic [N-1:0] w_n;
  logic [N-1:0] row_s, row_c;
  logic [N-1:0] csa_s, csa_c;

  p2_adder #(.N(N)) u_p2 (
    .x2 (x2),
    .x3_lo (x3[N-1:0]),
    .w  (w)
  );

  assign w_n = ~w;
  assign p2  = w;

  p1_row_reducer #(.N(N)) u_rows (
    .x1        (x1),
    .x3        (x3),
    .sum_row   (row_s),
    .carry_row (row_c)
  );

  mod_csa #(.N(N)) u_csa (
    .a (row_s),
    .b (row_c),
    .d (w_n),
    .s (csa_s),
    .c (csa_c)
  );

  mod_adder #(.N(N)) u_add (
    .a (csa_s),
    .b (csa_c),
    .s (p1)
  );
endmodule
