// csa_eac: one carry-save adder stage modulo 2^N-1 with end-around carry.
//
// Three N-bit operands a, b, c are reduced to two, s and cy, with
// s + cy == a + b + c (mod 2^N-1). Each bit is a full adder; the carry out of
// the top bit has weight 2^N == 1 (mod 2^N-1) and so is wrapped round into bit
// 0 of the carry vector instead of growing the word. The stage is purely
// combinational, one full-adder delay. Operands may use the all-ones pattern
// as a second code for zero; the outputs may as well.
module csa_eac #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);

  logic [N-1:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    // end-around carry: rotate the carries left by one position
    cy  = {maj[N-2:0], maj[N-1]};
  end

endmodule
