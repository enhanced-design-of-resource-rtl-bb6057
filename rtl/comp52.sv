// comp52: 5:2 compressor = one 4:2 compressor followed by one full adder,
// exact or approximate (the approximate version uses the approximate cells).
//
// Inputs: five bits x[4:0] of one column and two carry-ins cin[1:0] from the
// neighbouring column.  Outputs: the sum bit and three carries carry[2:0],
// each of twice the weight of sum.  Exact:
//   sum(x) + sum(cin) = sum + 2 * sum(carry).
// Combinational.
module comp52 #(
  parameter bit APPROX = 1'b0
) (
  input  logic [4:0] x,
  input  logic [1:0] cin,
  output logic       sum,
  output logic [2:0] carry
);

  logic s42;

  comp42 #(.APPROX(APPROX)) u_c42 (
    .x(x[3:0]), .cin(cin[0]), .sum(s42), .carry(carry[0]), .cout(carry[1])
  );

  full_adder #(.APPROX(APPROX)) u_fa (
    .a(s42), .b(x[4]), .cin(cin[1]), .sum(sum), .cout(carry[2])
  );

endmodule
