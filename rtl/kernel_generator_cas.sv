// kernel_generator_cas: A_X and B_X generator with cascade structure (the
// small variant).
//
// Computes the same kernel digits as kernel_generator_par (see there for the
// formulas) with one adder path instead of two. The operand mux, one
// end-around-carry CSA and one one's complement adder give |Z| (x1 < 2^N) or
// |Z'| (x1 = 2^N). A mux-based modulo 2^N-1 decrementer follows it and yields
// |Z-1| (or |Z'-1|, which is never selected). The borrow of the subtractor
// x2 - x1' chooses between the adder output and the decremented value for
// A_X; the subtractor's difference is B_X. Purely combinational: FA + one's
// complement adder + ceil(log2 N) OR gates + mux delays.
module kernel_generator_cas #(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   x1,   // residue modulo 2^N+1
  input  logic [N-1:0] x2,   // residue modulo 2^N
  input  logic [N-1:0] x3,   // residue modulo 2^N-1
  output logic [N-1:0] a_x,
  output logic [N-1:0] b_x
);

  logic [N-1:0] t2, t3, m;   // t1 only feeds the mux, inside operand_mux
  logic [N-1:0] s_z, c_z, z_mod, z_dec;
  logic         borrow;

  operand_mux #(.N(N)) u_ops (
    .x1(x1), .x2(x2), .x3(x3), .t1(), .t2(t2), .t3(t3), .m(m)
  );

  csa_eac #(.N(N)) u_csa_z (.a(m), .b(t2), .c(t3), .s(s_z), .cy(c_z));
  ones_comp_adder #(.N(N)) u_add (.a(s_z), .b(c_z), .s(z_mod));
  mod_decrementer #(.N(N)) u_dec (.z(z_mod), .y(z_dec));

  borrow_subtractor #(.N(N)) u_sub (
    .x2(x2), .x1l(x1[N-1:0]), .d(b_x), .borrow(borrow)
  );

  assign a_x = borrow ? z_dec : z_mod;

endmodule
