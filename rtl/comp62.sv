// comp62: 6:2 compressor = two 4:2 compressors in series, exact or
// approximate.  The first 4:2 takes x[3:0] and cin[0]; the second takes its
// sum, x[4], x[5], cin[1] and cin[2].
//
// Inputs: six column bits x[5:0] and three carry-ins cin[2:0].  Outputs: the
// sum bit and four carries carry[3:0] of twice its weight.  Exact:
//   sum(x) + sum(cin) = sum + 2 * sum(carry).
// The approximate version uses the same two-4:2 arrangement as the exact one;
// no extra full adder is added.  Combinational.
module comp62 #(
  parameter bit APPROX = 1'b0
) (
  input  logic [5:0] x,
  input  logic [2:0] cin,
  output logic       sum,
  output logic [3:0] carry
);

  logic sa;

  comp42 #(.APPROX(APPROX)) u_c42a (
    .x(x[3:0]), .cin(cin[0]), .sum(sa), .carry(carry[0]), .cout(carry[1])
  );

  comp42 #(.APPROX(APPROX)) u_c42b (
    .x({cin[1], x[5], x[4], sa}), .cin(cin[2]),
    .sum(sum), .carry(carry[2]), .cout(carry[3])
  );

endmodule
