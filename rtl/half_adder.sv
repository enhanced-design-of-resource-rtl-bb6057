// half_adder: one-bit half adder, exact or approximate.
//
// APPROX = 0: a + b = sum + 2*cout.
// APPROX = 1: the approximate half adder: the sum is the OR of the inputs,
//   as described; the carry is taken as a & b (this design's choice), so the
//   only error is the case a = b = 1, which reads as 3 instead of 2.
// Purely combinational; no clock.
module half_adder #(
  parameter bit APPROX = 1'b0
) (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  if (APPROX) begin : g_approx
    assign sum  = a | b;
    assign cout = a & b;
  end else begin : g_exact
    assign sum  = a ^ b;
    assign cout = a & b;
  end

endmodule
