// binary_comparator: unsigned magnitude comparator of two W-bit words.
//
// gt is 1 when a > b and eq is 1 when a == b. These are the c_i and E_i
// outputs of the three comparators in the top-level diagram. Which
// relation c_i reports (greater rather than less) is this implementation's
// choice. The comparison is written behaviourally and left to synthesis.
// Purely combinational.
module binary_comparator #(
  parameter int unsigned W = phi_pkg::N_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         eq
);
  always_comb begin
    gt = a > b;
    eq = a == b;
  end
endmodule
