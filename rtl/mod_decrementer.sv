// mod_decrementer: mux-based modulo 2^N-1 decrementer, y = |z - 1| mod 2^N-1.
//
// Bit j of the result depends only on z[j] and on whether any lower bit of z is
// set:  y[j] = ~(z[j] ^ OR(z[j-1:0])) for j >= 1, and
//       y[0] =   z[0] ^ OR(z[N-1:0]).
// The prefix ORs (the "decision module") are built as a log2(N)-level
// Sklansky parallel-prefix OR tree of about (N/2)*log2(N) OR gates; each
// output bit is then a 2:1 mux choosing z[j] or its inverse. The delay is
// ceil(log2 N) OR gates plus one mux. z may be all-ones (the second code for
// zero); the result is always in [0, 2^N-2]. The bit equations and the
// OR-tree-plus-mux structure follow the design; the Sklansky arrangement of
// the OR tree is this implementation's reading of it. Purely combinational.
module mod_decrementer #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] y
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP     = 1 << LEVELS;   // N padded to a power of two

  // Sklansky prefix OR (the decision module): at level k every block of
  // 2^(k+1) bits ORs the top bit of its lower half into all bits of its upper
  // half, NP/2 OR gates per level. After the last level por[LEVELS][j] is the
  // OR of z[j:0].
  logic [LEVELS:0][NP-1:0] por;
  logic [N-1:0]            below;   // below[j] = OR(z[j-1:0]), below[0] = 0
  logic                    any;     // OR of all bits of z

  assign por[0] = NP'(z);

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned H = 1 << k;   // half-block size at this level
    for (genvar b = 0; b < NP / (2 * H); b++) begin : g_block
      assign por[k+1][b*2*H +: H]     = por[k][b*2*H +: H];
      assign por[k+1][b*2*H + H +: H] = por[k][b*2*H + H +: H] | {H{por[k][b*2*H + H - 1]}};
    end
  end

  always_comb begin
    below = N'(por[LEVELS] << 1);
    any   = por[LEVELS][N-1];
    // mux array: bit j passes z[j] when a lower bit is set, else its inverse;
    // bit 0 is inverted when any bit is set
    y = ~(z ^ below) ^ {{(N-1){1'b0}}, ~any};
  end

endmodule
