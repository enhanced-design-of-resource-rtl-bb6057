// tb_half_adder: exhaustive check of both half-adder variants.
// Exact: a + b = sum + 2*cout.  Approximate: sum = a | b, cout = a & b.
module tb_half_adder;
  logic a, b;
  logic se, ce, sa, ca;
  int checks = 0, failures = 0;

  half_adder #(.APPROX(1'b0)) dut_e (.a(a), .b(b), .sum(se), .cout(ce));
  half_adder #(.APPROX(1'b1)) dut_a (.a(a), .b(b), .sum(sa), .cout(ca));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'(a) + int'(b) != int'(se) + 2 * int'(ce)) begin
        failures++;
        $display("exact HA mismatch %b%b -> s=%b c=%b", a, b, se, ce);
      end
      checks++;
      if (sa !== (a | b) || ca !== (a & b)) begin
        failures++;
        $display("approx HA mismatch %b%b -> s=%b c=%b", a, b, sa, ca);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
