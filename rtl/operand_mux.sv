// operand_mux: forms the three modulo 2^N-1 terms of the kernel digit A_X from
// the residues of X for the moduli set {2^N+1, 2^N, 2^N-1}.
//
//   t1 = |2^(N-1) * x1'| mod 2^N-1  -> x1' rotated right by one bit
//   t2 = |-x2|           mod 2^N-1  -> x2 inverted bit by bit
//   t3 = |2^(N-1) * x3|  mod 2^N-1  -> x3 rotated right by one bit
// where x1' is the low N bits of x1. The mux array replaces t1 by the constant
// 2^(N-1)-1 when x1 = 2^N (its top bit x1[N] set), giving in m the first
// operand of Z (x1[N] = 0) or of Z' (x1[N] = 1). Only wiring, inverters and a
// row of 2:1 muxes; purely combinational.
module operand_mux #(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   x1,   // residue modulo 2^N+1
  input  logic [N-1:0] x2,   // residue modulo 2^N
  input  logic [N-1:0] x3,   // residue modulo 2^N-1
  output logic [N-1:0] t1,
  output logic [N-1:0] t2,
  output logic [N-1:0] t3,
  output logic [N-1:0] m
);

  localparam logic [N-1:0] HALF_M1 = {1'b0, {(N-1){1'b1}}};   // 2^(N-1)-1

  always_comb begin
    t1 = {x1[0], x1[N-1:1]};
    t2 = ~x2;
    t3 = {x3[0], x3[N-1:1]};
    m  = x1[N] ? HALF_M1 : t1;
  end

endmodule
