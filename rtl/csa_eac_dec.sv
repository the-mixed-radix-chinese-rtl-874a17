// csa_eac_dec: carry-save stage modulo 2^N-1 that adds two operands and the
// constant 11...10 (binary), that is 2^N-2 == -1 (mod 2^N-1).
//
// s + cy == a + b - 1 (mod 2^N-1). Because the third operand is a constant,
// every full adder collapses: bit 0 (constant 0) becomes an XOR for the sum and
// an AND for the carry, every higher bit (constant 1) an XNOR for the sum and
// an OR for the carry. The carry out of the top bit wraps round to bit 0 of
// the carry vector (end-around carry). Purely combinational.
module csa_eac_dec #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);

  localparam logic [N-1:0] MINUS1 = {{(N-1){1'b1}}, 1'b0};   // 11...10

  logic [N-1:0] carry;

  always_comb begin
    // XNOR/OR where the constant bit is 1, XOR/AND where it is 0
    s     = a ^ b ^ MINUS1;
    carry = ((a | b) & MINUS1) | (a & b & ~MINUS1);
    cy    = {carry[N-2:0], carry[N-1]};
  end

endmodule
