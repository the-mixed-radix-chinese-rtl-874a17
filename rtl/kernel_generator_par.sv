// kernel_generator_par: A_X and B_X generator with parallel structure (the
// fast variant).
//
// For X = (x3, x2, x1) in the moduli set {2^N-1, 2^N, 2^N+1} the mixed-radix
// CRT gives X = (2^N+1)*2^N*A_X + (2^N+1)*B_X + x1, with A_X in [0, 2^N-2] and
// B_X in [0, 2^N-1]; (A_X, B_X, x1) is the kernel of X and orders residue
// numbers like their magnitudes. With Z = t1+t2+t3 and Z' = (2^(N-1)-1)+t2+t3
// (see operand_mux):
//   A_X = |Z-1|  if x1 < 2^N and x2 < x1,
//         |Z|    if x1 < 2^N and x2 >= x1,
//         |Z'|   if x1 = 2^N                 (all modulo 2^N-1)
//   B_X = |x2 - x1'| mod 2^N.
// Path 1: the operand mux, one end-around-carry CSA and one-complement adder 1
// give |Z| or |Z'|. Path 2, in parallel: a simplified CSA adding t1, t2 and
// 11...10 (= -1), a second end-around-carry CSA adding t3, and one's
// complement adder 2 give |Z-1|. The subtractor x2 - x1' gives B_X as its
// difference, and its borrow drives the final mux array choosing A_X.
// Purely combinational: XOR + FA + one's complement adder + mux delay.
module kernel_generator_par #(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   x1,   // residue modulo 2^N+1
  input  logic [N-1:0] x2,   // residue modulo 2^N
  input  logic [N-1:0] x3,   // residue modulo 2^N-1
  output logic [N-1:0] a_x,
  output logic [N-1:0] b_x
);

  logic [N-1:0] t1, t2, t3, m;
  logic [N-1:0] s_z, c_z, z_mod;            // |Z| or |Z'|
  logic [N-1:0] s_d, c_d, s_d2, c_d2, zm1;  // |Z-1|
  logic         borrow;

  operand_mux #(.N(N)) u_ops (
    .x1(x1), .x2(x2), .x3(x3), .t1(t1), .t2(t2), .t3(t3), .m(m)
  );

  // path 1: |Z| (x1 < 2^N) or |Z'| (x1 = 2^N)
  csa_eac #(.N(N)) u_csa_z (.a(m), .b(t2), .c(t3), .s(s_z), .cy(c_z));
  ones_comp_adder #(.N(N)) u_add1 (.a(s_z), .b(c_z), .s(z_mod));

  // path 2: |Z-1| = |t1 + t2 + t3 + 11...10|
  csa_eac_dec #(.N(N)) u_csa_dec (.a(t1), .b(t2), .s(s_d), .cy(c_d));
  csa_eac #(.N(N)) u_csa_d2 (.a(s_d), .b(c_d), .c(t3), .s(s_d2), .cy(c_d2));
  ones_comp_adder #(.N(N)) u_add2 (.a(s_d2), .b(c_d2), .s(zm1));

  borrow_subtractor #(.N(N)) u_sub (
    .x2(x2), .x1l(x1[N-1:0]), .d(b_x), .borrow(borrow)
  );

  assign a_x = borrow ? zm1 : z_mod;

endmodule
