// comp72: 7:2 compressor = one 5:2 compressor followed by one 4:2
// compressor, exact or approximate.  The 5:2 takes x[4:0] and cin[1:0]; the
// 4:2 takes its sum, x[5], x[6], cin[2] and cin[3].
//
// Inputs: seven column bits x[6:0] and four carry-ins cin[3:0].  Outputs: the
// sum bit and five carries carry[4:0] of twice its weight.  Exact:
//   sum(x) + sum(cin) = sum + 2 * sum(carry).
// Combinational.
module comp72 #(
  parameter bit APPROX = 1'b0
) (
  input  logic [6:0] x,
  input  logic [3:0] cin,
  output logic       sum,
  output logic [4:0] carry
);

  logic s52;

  comp52 #(.APPROX(APPROX)) u_c52 (
    .x(x[4:0]), .cin(cin[1:0]), .sum(s52), .carry(carry[2:0])
  );

  comp42 #(.APPROX(APPROX)) u_c42 (
    .x({cin[2], x[6], x[5], s52}), .cin(cin[3]),
    .sum(sum), .carry(carry[3]), .cout(carry[4])
  );

endmodule
