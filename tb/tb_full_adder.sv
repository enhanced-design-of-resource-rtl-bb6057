// tb_full_adder: exhaustive check of both full-adder variants.
// Exact: a + b + cin must equal sum + 2*cout.  Approximate: sum must be
// a | b | cin and cout must equal cin.  All 8 input patterns, #1 apart.
module tb_full_adder;
  logic a, b, cin;
  logic se, ce, sa, ca;
  int checks = 0, failures = 0;

  full_adder #(.APPROX(1'b0)) dut_e (.a(a), .b(b), .cin(cin), .sum(se), .cout(ce));
  full_adder #(.APPROX(1'b1)) dut_a (.a(a), .b(b), .cin(cin), .sum(sa), .cout(ca));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (int'(a) + int'(b) + int'(cin) != int'(se) + 2 * int'(ce)) begin
        failures++;
        $display("exact FA mismatch %b%b%b -> s=%b c=%b", a, b, cin, se, ce);
      end
      checks++;
      if (sa !== (a | b | cin) || ca !== cin) begin
        failures++;
        $display("approx FA mismatch %b%b%b -> s=%b c=%b", a, b, cin, sa, ca);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
