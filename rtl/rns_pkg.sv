// rns_pkg: shared types for the residue comparators of the moduli set
// {2^n-1, 2^n, 2^n+1}.
//
// gen_kind_e selects how a comparator derives the kernel (A_X, B_X) of an
// operand: GEN_PARALLEL computes |Z|, |Z'| and |Z-1| modulo 2^n-1 side by side
// (the fast variant), GEN_CASCADE computes |Z| or |Z'| first and then
// decrements it (the small variant). Both variants follow the design; the
// enum itself is this implementation's way of choosing between them.
package rns_pkg;

  typedef enum logic {
    GEN_PARALLEL = 1'b0,
    GEN_CASCADE  = 1'b1
  } gen_kind_e;

endpackage
