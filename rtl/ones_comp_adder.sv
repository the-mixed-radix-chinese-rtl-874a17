// ones_comp_adder: N-bit one's complement adder, i.e. an adder modulo 2^N-1.
//
// s = (a + b) mod 2^N-1 for a, b in [0, 2^N-1] (the all-ones pattern is read
// as zero). It is a carry-propagate adder whose carry out is fed back into the
// least significant position (end-around carry). An end-around-carry adder on
// its own can leave the all-ones pattern as its result when the true sum is a
// non-zero multiple of 2^N-1; the kernel digits it produces are later compared
// as plain binary numbers, so this block adds a final step that maps all-ones
// to zero. The output is therefore always the canonical value in [0, 2^N-2].
// That normalisation, and the ripple adder rather than a parallel-prefix one,
// are this implementation's choices. Purely combinational.
module ones_comp_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  logic [N:0]   raw;   // a + b with its carry out
  logic [N-1:0] eac;   // after the end-around carry

  always_comb begin
    raw = {1'b0, a} + {1'b0, b};
    // raw <= 2^(N+1)-2, so when raw[N] is set raw[N-1:0] <= 2^N-2 and adding
    // the carry back in cannot overflow again
    eac = raw[N-1:0] + N'(raw[N]);
    s   = (&eac) ? '0 : eac;
  end

endmodule
