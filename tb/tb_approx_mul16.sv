// tb_approx_mul16: end-to-end test of the 16x16 approximate multiplier at
// its default configuration (column-23 carries added at column 30).
//
// Applies corner operands and then 500,000 uniformly random operand pairs,
// #1 apart, comparing each product with amul_ref_pkg::ref_mul16.  It counts
// how often each mechanism of the design fires and fails if one never does:
//   * one and two carries leaving column 23 and being added at column 30;
//   * the carry out of column 31 being dropped;
//   * each 8x8 compensation path (column-5 OR bits, ORed approximate carries).
// It also reports the error against the exact product: MED, NMED = MED /
// (2^16-1)^2, MRED over non-zero products and the largest error distance.
module tb_approx_mul16;
  import amul_ref_pkg::*;

  localparam int NRAND = 500000;

  logic [15:0] a, b;
  logic [31:0] y, yref;
  int checks = 0, failures = 0;
  int n_c23_1 = 0, n_c23_2 = 0, n_wrap = 0;
  int n_comp6 = 0, n_comp8 = 0, n_comp9 = 0;
  real sum_ed = 0.0, sum_red = 0.0;
  int n_red = 0;
  longint max_ed = 0;

  approx_mul16 dut (.a(a), .b(b), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_);
    int c23;
    mul8_events_t ev;
    logic [15:0] p3;
    longint exact, ed;
    a = ta;
    b = tb_;
    #1;
    yref = ref_mul16(a, b, 0, c23);
    p3 = ref_mul8(a[15:8], b[15:8], ev);
    if (c23 == 1) n_c23_1++;
    if (c23 == 2) n_c23_2++;
    if (int'(p3[15:14]) + c23 > 3) n_wrap++;
    void'(ref_mul8(a[7:0], b[7:0], ev));
    n_comp6 += int'(ev.comp6);
    n_comp8 += int'(ev.comp8);
    n_comp9 += int'(ev.comp9);
    checks++;
    if (y !== yref) begin
      failures++;
      if (failures < 10)
        $display("mismatch a=%h b=%h y=%h expected %h", a, b, y, yref);
    end
    exact = longint'(a) * longint'(b);
    ed = longint'(y) - exact;
    if (ed < 0) ed = -ed;
    sum_ed += real'(ed);
    if (ed > max_ed) max_ed = ed;
    if (exact != 0) begin
      sum_red += real'(ed) / real'(exact);
      n_red++;
    end
  endtask

  initial begin
    int n;
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFFFF, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'h00FF, 16'hFF00);
    apply(16'h1234, 16'hABCD);
    for (int i = 0; i < NRAND; i++) apply(16'($urandom), 16'($urandom));
    n = NRAND + 6;
    checks++;
    if (n_c23_1 == 0 || n_c23_2 == 0 || n_wrap == 0) begin
      failures++;
      $display("a column-23/30/31 carry case was never exercised");
    end
    checks++;
    if (n_comp6 == 0 || n_comp8 == 0 || n_comp9 == 0) begin
      failures++;
      $display("an 8x8 compensation path was never exercised");
    end
    $display("events: c23=1:%0d c23=2:%0d col31 wrap:%0d comp6=%0d comp8=%0d comp9=%0d",
             n_c23_1, n_c23_2, n_wrap, n_comp6, n_comp8, n_comp9);
    $display("MED=%0.1f NMED=%0.3e MRED=%0.3e max ED=%0d",
             sum_ed / real'(n), sum_ed / real'(n) / (65535.0 * 65535.0),
             sum_red / real'(n_red), max_ed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
