// rns_comparator_top: the two proposed residue comparators for the moduli set
// {2^N-1, 2^N, 2^N+1}, side by side on the same operands.
//
// c2_* comes from the comparator built on the parallel kernel generator (the
// faster design), c3_* from the one built on the cascade kernel generator (the
// smaller design). Both give cxy = (X > Y) and exy = (X = Y) and must always
// agree; the pair exists so that both variants can be built, simulated and
// sized from one top. Operands are residue triples: x1 modulo 2^N+1 (N+1
// bits), x2 modulo 2^N, x3 modulo 2^N-1. Purely combinational, no clock.
module rns_comparator_top
  import rns_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   x1,
  input  logic [N-1:0] x2,
  input  logic [N-1:0] x3,
  input  logic [N:0]   y1,
  input  logic [N-1:0] y2,
  input  logic [N-1:0] y3,
  output logic         c2_cxy,
  output logic         c2_exy,
  output logic         c3_cxy,
  output logic         c3_exy
);

  residue_comparator #(.N(N), .GEN(GEN_PARALLEL)) u_c2 (
    .x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3),
    .cxy(c2_cxy), .exy(c2_exy)
  );

  residue_comparator #(.N(N), .GEN(GEN_CASCADE)) u_c3 (
    .x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3),
    .cxy(c3_cxy), .exy(c3_exy)
  );

endmodule
