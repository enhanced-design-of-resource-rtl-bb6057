// comp42: 4:2 compressor built from two full adders, exact or approximate.
//
// The first adder takes x[0], x[1], x[2] and gives a partial sum and the
// horizontal carry cout; the second adds the partial sum, x[3] and the
// carry-in cin from the neighbouring column, giving sum and carry.
// Exact (APPROX = 0):
//   x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout).
// Approximate (APPROX = 1): both adders are the approximate full adder, so
//   sum is the OR of all five inputs, cout = x[2] and carry = cin.
// carry and cout both weigh twice sum; cout does not depend on cin, so a row
// of these cells has no ripple through cout.  Combinational.
module comp42 #(
  parameter bit APPROX = 1'b0
) (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  logic s1;

  full_adder #(.APPROX(APPROX)) u_fa1 (
    .a(x[0]), .b(x[1]), .cin(x[2]), .sum(s1), .cout(cout)
  );

  full_adder #(.APPROX(APPROX)) u_fa2 (
    .a(s1), .b(x[3]), .cin(cin), .sum(sum), .cout(carry)
  );

endmodule
