// tb_comp72: exhaustive check of the exact and approximate 7:2
// compressors over all 2^11 patterns of x[6:0] and cin[3:0].
// Exact: popcount(x) + popcount(cin) = sum + 2*popcount(carry).
// Approximate: sum = OR of all inputs; each carry forwards the input that
// sits on the carry-in pin of its approximate full adder:
// carry = {x[6], cin[3], cin[1], x[2], cin[0]}.
module tb_comp72;
  logic [6:0] x;
  logic [3:0] cin;
  logic       se, sa;
  logic [4:0] ke, ka, kexp;
  int checks = 0, failures = 0;

  comp72 #(.APPROX(1'b0)) dut_e (.x(x), .cin(cin), .sum(se), .carry(ke));
  comp72 #(.APPROX(1'b1)) dut_a (.x(x), .cin(cin), .sum(sa), .carry(ka));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      {x, cin} = 11'(v);
      #1;
      checks++;
      if ($countones({x, cin}) != int'(se) + 2 * $countones(ke)) begin
        failures++;
        $display("exact 7:2 mismatch x=%b cin=%b -> s=%b k=%b", x, cin, se, ke);
      end
      kexp = {x[6], cin[3], cin[1], x[2], cin[0]};
      checks++;
      if (sa !== (|{x, cin}) || ka !== kexp) begin
        failures++;
        $display("approx 7:2 mismatch x=%b cin=%b -> s=%b k=%b", x, cin, sa, ka);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
