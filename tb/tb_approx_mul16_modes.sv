// tb_approx_mul16_modes: compares the three placements of the column-23
// carries of the 16x16 approximate multiplier (C23_MODE).
//
// One instance per mode receives the same 200,000 random operand pairs plus
// corner cases; each product is checked against amul_ref_pkg::ref_mul16 for
// that mode, and the error metrics (MED, NMED, MRED) of every mode are
// printed side by side.
module tb_approx_mul16_modes;
  import amul_pkg::*;
  import amul_ref_pkg::*;

  localparam int NRAND = 200000;

  logic [15:0] a, b;
  logic [31:0] y [3];
  int checks = 0, failures = 0;
  real sum_ed [3];
  real sum_red [3];
  int n = 0, n_red = 0;

  approx_mul16 #(.C23_MODE(C23_TO_COL30)) dut30 (.a(a), .b(b), .y(y[0]));
  approx_mul16 #(.C23_MODE(C23_DROP))     dutdr (.a(a), .b(b), .y(y[1]));
  approx_mul16 #(.C23_MODE(C23_TO_COL24)) dut24 (.a(a), .b(b), .y(y[2]));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_);
    int c23;
    longint exact, ed;
    a = ta;
    b = tb_;
    #1;
    n++;
    exact = longint'(a) * longint'(b);
    if (exact != 0) n_red++;
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (y[m] !== ref_mul16(a, b, m, c23)) begin
        failures++;
        if (failures < 10)
          $display("mode %0d mismatch a=%h b=%h y=%h", m, a, b, y[m]);
      end
      ed = longint'(y[m]) - exact;
      if (ed < 0) ed = -ed;
      sum_ed[m] += real'(ed);
      if (exact != 0) sum_red[m] += real'(ed) / real'(exact);
    end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      sum_ed[m] = 0.0;
      sum_red[m] = 0.0;
    end
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h0000, 16'hFFFF);
    apply(16'hFF00, 16'h00FF);
    for (int i = 0; i < NRAND; i++) apply(16'($urandom), 16'($urandom));
    for (int m = 0; m < 3; m++)
      $display("mode %0d: MED=%0.1f NMED=%0.3e MRED=%0.3e", m,
               sum_ed[m] / real'(n), sum_ed[m] / real'(n) / (65535.0 * 65535.0),
               sum_red[m] / real'(n_red));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
