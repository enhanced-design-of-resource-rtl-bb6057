// comp82: 8:2 compressor = one 6:2 compressor followed by one 4:2
// compressor, exact or approximate.  The 6:2 takes x[5:0] and cin[2:0]; the
// 4:2 takes its sum, x[6], x[7], cin[3] and cin[4].
//
// Inputs: eight column bits x[7:0] and five carry-ins cin[4:0].  Outputs: the
// sum bit and six carries carry[5:0] of twice its weight.  Exact:
//   sum(x) + sum(cin) = sum + 2 * sum(carry).
// With APPROX = 1 and the carry-ins at zero, sum is the OR of x[7:0] and the
// only carries that can be 1 are carry[1] = x[2], carry[3] = x[5] and
// carry[5] = x[7].  Combinational.
module comp82 #(
  parameter bit APPROX = 1'b0
) (
  input  logic [7:0] x,
  input  logic [4:0] cin,
  output logic       sum,
  output logic [5:0] carry
);

  logic s62;

  comp62 #(.APPROX(APPROX)) u_c62 (
    .x(x[5:0]), .cin(cin[2:0]), .sum(s62), .carry(carry[3:0])
  );

  comp42 #(.APPROX(APPROX)) u_c42 (
    .x({cin[3], x[7], x[6], s62}), .cin(cin[4]),
    .sum(sum), .carry(carry[4]), .cout(carry[5])
  );

endmodule
