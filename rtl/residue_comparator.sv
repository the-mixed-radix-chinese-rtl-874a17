// residue_comparator: magnitude comparator for two residue numbers of the
// moduli set {2^N-1, 2^N, 2^N+1}, without converting them to binary.
//
// Each operand X = (x3, x2, x1), x3 = |X| mod 2^N-1, x2 = |X| mod 2^N,
// x1 = |X| mod 2^N+1, is mapped by a kernel generator to its kernel
// (A_X, B_X, x1), a mixed-radix form X = (2^N+1)*2^N*A_X + (2^N+1)*B_X + x1.
// The kernels are compared digit by digit, most significant first:
// comparators on A (N bits), B (N bits) and x1 (N+1 bits) give (C1,E1),
// (C2,E2), (C3,E3); exy = E1 & E2 & E3 and cxy is C1 if E1 = 0, else C2 if
// E2 = 0, else C3 (two cascaded 2:1 muxes).
// GEN selects the kernel generator: GEN_PARALLEL (kernel_generator_par, the
// faster comparator) or GEN_CASCADE (kernel_generator_cas, the smaller one).
// Inputs must be valid residues (x1 <= 2^N, x3 <= 2^N-2); x3 = 2^N-1 is also
// accepted as a second code for zero. Purely combinational.
module residue_comparator
  import rns_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter gen_kind_e   GEN = GEN_PARALLEL
) (
  input  logic [N:0]   x1,
  input  logic [N-1:0] x2,
  input  logic [N-1:0] x3,
  input  logic [N:0]   y1,
  input  logic [N-1:0] y2,
  input  logic [N-1:0] y3,
  output logic         cxy,   // X > Y
  output logic         exy    // X = Y
);

  logic [N-1:0] ax, bx, ay, by;
  logic         c1, e1, c2, e2, c3, e3;

  if (GEN == GEN_PARALLEL) begin : g_par
    kernel_generator_par #(.N(N)) u_gen_x (.x1(x1), .x2(x2), .x3(x3), .a_x(ax), .b_x(bx));
    kernel_generator_par #(.N(N)) u_gen_y (.x1(y1), .x2(y2), .x3(y3), .a_x(ay), .b_x(by));
  end else begin : g_cas
    kernel_generator_cas #(.N(N)) u_gen_x (.x1(x1), .x2(x2), .x3(x3), .a_x(ax), .b_x(bx));
    kernel_generator_cas #(.N(N)) u_gen_y (.x1(y1), .x2(y2), .x3(y3), .a_x(ay), .b_x(by));
  end

  binary_comparator #(.W(N))   u_cmp_a (.a(ax), .b(ay), .gt(c1), .eq(e1));
  binary_comparator #(.W(N))   u_cmp_b (.a(bx), .b(by), .gt(c2), .eq(e2));
  binary_comparator #(.W(N+1)) u_cmp_x (.a(x1), .b(y1), .gt(c3), .eq(e3));

  always_comb begin
    exy = e1 & e2 & e3;
    cxy = e1 ? (e2 ? c3 : c2) : c1;
  end

endmodule
