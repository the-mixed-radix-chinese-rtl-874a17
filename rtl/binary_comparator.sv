// binary_comparator: W-bit unsigned magnitude comparator.
//
// eq = (a == b); gt = (a > b). The residue comparator uses three of them, on
// the kernel digits A (N bits), B (N bits) and x1 (N+1 bits). Purely
// combinational.
module binary_comparator #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         eq
);

  always_comb begin
    eq = (a == b);
    gt = (a > b);
  end

endmodule
