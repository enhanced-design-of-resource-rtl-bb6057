// tb_approx_mul8: exhaustive test of the 8x8 approximate multiplier.
//
// All 65,536 operand pairs are applied, #1 apart, and every product is
// compared with amul_ref_pkg::ref_mul8, a model written from the region
// rules (constant 000110, OR-based approximate columns, exact sum above).
// The testbench also counts how often each compensation path fires (the two
// column-5 OR bits and the ORed approximate carries into column 9) and fails
// if one never does, and it reports the error against the exact product:
// mean error distance (MED), NMED = MED / 255^2, MRED over non-zero
// products, and the largest error distance.
module tb_approx_mul8;
  import amul_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] y, yref;
  mul8_events_t ev;
  int checks = 0, failures = 0;
  int n_comp6 = 0, n_comp8 = 0, n_comp9 = 0;
  real sum_ed = 0.0, sum_red = 0.0;
  int n_red = 0, max_ed = 0;

  approx_mul8 dut (.a(a), .b(b), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      yref = ref_mul8(a, b, ev);
      n_comp6 += int'(ev.comp6);
      n_comp8 += int'(ev.comp8);
      n_comp9 += int'(ev.comp9);
      checks++;
      if (y !== yref) begin
        failures++;
        if (failures < 10)
          $display("mismatch a=%0d b=%0d y=%0d expected %0d", a, b, y, yref);
      end
      begin
        int exact, ed;
        exact = int'(a) * int'(b);
        ed = int'(y) - exact;
        if (ed < 0) ed = -ed;
        sum_ed += real'(ed);
        if (ed > max_ed) max_ed = ed;
        if (exact != 0) begin
          sum_red += real'(ed) / real'(exact);
          n_red++;
        end
      end
    end
    checks++;
    if (n_comp6 == 0 || n_comp8 == 0 || n_comp9 == 0) begin
      failures++;
      $display("a compensation path was never exercised");
    end
    $display("events: comp6=%0d comp8=%0d comp9=%0d", n_comp6, n_comp8, n_comp9);
    $display("MED=%0.2f NMED=%0.3e MRED=%0.3e max ED=%0d",
             sum_ed / 65536.0, sum_ed / 65536.0 / 65025.0,
             sum_red / real'(n_red), max_ed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
