// tb_comp42: exhaustive check of the exact and approximate 4:2 compressors.
// Exact: popcount(x) + cin = sum + 2*(carry + cout), and cout must not
// depend on cin.  Approximate: sum = OR of all inputs, carry = cin,
// cout = x[2] (two approximate full adders in series).  32 patterns.
module tb_comp42;
  logic [3:0] x;
  logic       cin;
  logic se, ke, oe, sa, ka, oa;
  logic oe_prev;
  int checks = 0, failures = 0;

  comp42 #(.APPROX(1'b0)) dut_e (.x(x), .cin(cin), .sum(se), .carry(ke), .cout(oe));
  comp42 #(.APPROX(1'b1)) dut_a (.x(x), .cin(cin), .sum(sa), .carry(ka), .cout(oa));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x, cin} = 5'(v);
      #1;
      checks++;
      if ($countones({x, cin}) != int'(se) + 2 * (int'(ke) + int'(oe))) begin
        failures++;
        $display("exact 4:2 mismatch x=%b cin=%b -> %b %b %b", x, cin, se, ke, oe);
      end
      if (cin) begin
        checks++;
        if (oe !== oe_prev) begin
          failures++;
          $display("exact 4:2 cout depends on cin at x=%b", x);
        end
      end
      oe_prev = oe;
      checks++;
      if (sa !== (|{x, cin}) || ka !== cin || oa !== x[2]) begin
        failures++;
        $display("approx 4:2 mismatch x=%b cin=%b -> %b %b %b", x, cin, sa, ka, oa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
