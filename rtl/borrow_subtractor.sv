// borrow_subtractor: N-bit subtractor x2 - x1l = -2^N*borrow + d.
//
// d is the N-bit difference |x2 - x1l| mod 2^N and borrow is set when x2 < x1l.
// In the kernel generators d is directly the kernel digit B_X and borrow
// selects the decremented value for A_X. Built as x2 + ~x1l + 1 with the borrow
// taken as the inverted carry out. Purely combinational.
module borrow_subtractor #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x2,
  input  logic [N-1:0] x1l,
  output logic [N-1:0] d,
  output logic         borrow
);

  logic [N:0] sum;

  always_comb begin
    sum    = {1'b0, x2} + {1'b0, ~x1l} + (N+1)'(1);
    d      = sum[N-1:0];
    borrow = ~sum[N];
  end

endmodule
