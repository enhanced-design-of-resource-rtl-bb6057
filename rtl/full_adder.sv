// full_adder: one-bit full adder, exact or approximate.
//
// APPROX = 0: the ordinary full adder, a + b + cin = sum + 2*cout.
// APPROX = 1: the proposed approximate full adder: the sum is the OR of the
//   three inputs and the carry-out simply forwards the carry-in
//   (sum = a | b | cin, cout = cin).  Both equations follow the described
//   adder; the approximate cell needs no XOR and no majority gate.
// Purely combinational; no clock.
module full_adder #(
  parameter bit APPROX = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  if (APPROX) begin : g_approx
    assign sum  = a | b | cin;
    assign cout = cin;
  end else begin : g_exact
    assign sum  = a ^ b ^ cin;
    assign cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
