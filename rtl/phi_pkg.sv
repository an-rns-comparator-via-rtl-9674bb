// phi_pkg: constants shared by the comparator for the moduli set
// {2^n-1, 2^n, 2^(n+1)-1}.
//
// N_DEFAULT is the word size n used throughout: the evaluated design point
// is n = 8, which gives residues of 8, 8 and 9 bits and a dynamic range of
// 255 * 256 * 511 = 33,358,080 values. Every module takes its own N
// parameter with this value as default.
package phi_pkg;
  parameter int unsigned N_DEFAULT = 8;
endpackage
