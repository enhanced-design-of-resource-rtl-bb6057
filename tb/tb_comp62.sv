// tb_comp62: exhaustive check of the exact and approximate 6:2
// compressors over all 2^9 patterns of x[5:0] and cin[2:0].
// Exact: popcount(x) + popcount(cin) = sum + 2*popcount(carry).
// Approximate: sum = OR of all inputs; each carry forwards the input that
// sits on the carry-in pin of its approximate full adder:
// carry = {x[5], cin[2], x[2], cin[0]}.
module tb_comp62;
  logic [5:0] x;
  logic [2:0] cin;
  logic       se, sa;
  logic [3:0] ke, ka, kexp;
  int checks = 0, failures = 0;

  comp62 #(.APPROX(1'b0)) dut_e (.x(x), .cin(cin), .sum(se), .carry(ke));
  comp62 #(.APPROX(1'b1)) dut_a (.x(x), .cin(cin), .sum(sa), .carry(ka));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 9); v++) begin
      {x, cin} = 9'(v);
      #1;
      checks++;
      if ($countones({x, cin}) != int'(se) + 2 * $countones(ke)) begin
        failures++;
        $display("exact 6:2 mismatch x=%b cin=%b -> s=%b k=%b", x, cin, se, ke);
      end
      kexp = {x[5], cin[2], x[2], cin[0]};
      checks++;
      if (sa !== (|{x, cin}) || ka !== kexp) begin
        failures++;
        $display("approx 6:2 mismatch x=%b cin=%b -> s=%b k=%b", x, cin, sa, ka);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
