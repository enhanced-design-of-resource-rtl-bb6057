// approx_mul16: 16x16 unsigned approximate multiplier built from four
// approx_mul8 multipliers and one row of column compressors.
//
// With a = {ah, al} and b = {bh, bl}, the four 8x8 products are
//   p0 = al*bl (weight 1), p1 = ah*bl and p2 = al*bh (weight 2^8),
//   p3 = ah*bh (weight 2^16).
// They overlap in three rows, which are combined column by column:
//   * columns 0..7:   y = p0[7:0] directly;
//   * column 8:       approximate full adder over p0[8], p1[0], p2[0];
//   * columns 9..15:  approximate 4:2 compressors, each adding the three
//                     product bits of the column and the carry and cout of
//                     the column below;
//   * columns 16..23: the same arrangement with exact 4:2 compressors
//                     (p1, p2 high bytes and p3 low byte);
//   * columns 24..29: y = p3[13:8] directly;
//   * columns 30..31: with C23_MODE = C23_TO_COL30 (the default, as
//                     described) the two carries leaving column 23 skip
//                     columns 24..29 and are added to p3[14] by an exact full
//                     adder whose carry is added to p3[15] by an exact half
//                     adder; the carry out of column 31 is dropped.
// C23_MODE is this design's addition for comparing the error of that
// arrangement: C23_DROP discards the column-23 carries and C23_TO_COL24 adds
// them at their own weight (so columns 16..31 are then exact).
// The order of inputs inside each 4:2 (p0/p1 first, then p2 or p3, then the
// incoming carry) is this design's choice.
// Interface: a, b unsigned 16 bits; y 32 bits.  Purely combinational.
module approx_mul16
  import amul_pkg::*;
#(
  parameter c23_mode_e C23_MODE = C23_TO_COL30
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] y
);

  logic [15:0] p0, p1, p2, p3;

  approx_mul8 u_m0 (.a(a[7:0]),  .b(b[7:0]),  .y(p0));
  approx_mul8 u_m1 (.a(a[15:8]), .b(b[7:0]),  .y(p1));
  approx_mul8 u_m2 (.a(a[7:0]),  .b(b[15:8]), .y(p2));
  approx_mul8 u_m3 (.a(a[15:8]), .b(b[15:8]), .y(p3));

  // carry[c] and cout[c] leave column c and enter column c + 1.
  logic [23:8] carry;
  logic [23:8] cout;

  assign y[7:0] = p0[7:0];

  // Column 8: approximate full adder; it has a single carry output.
  full_adder #(.APPROX(1'b1)) u_col8 (
    .a(p0[8]), .b(p1[0]), .cin(p2[0]), .sum(y[8]), .cout(carry[8])
  );
  assign cout[8] = 1'b0;

  // Columns 9..15: approximate 4:2 compressors.
  for (genvar c = 9; c <= 15; c++) begin : g_apx
    comp42 #(.APPROX(1'b1)) u_c42 (
      .x({carry[c-1], p2[c-8], p1[c-8], p0[c]}), .cin(cout[c-1]),
      .sum(y[c]), .carry(carry[c]), .cout(cout[c])
    );
  end

  // Columns 16..23: exact 4:2 compressors.
  for (genvar c = 16; c <= 23; c++) begin : g_exa
    comp42 #(.APPROX(1'b0)) u_c42 (
      .x({carry[c-1], p3[c-16], p2[c-8], p1[c-8]}), .cin(cout[c-1]),
      .sum(y[c]), .carry(carry[c]), .cout(cout[c])
    );
  end

  // Columns 24..31.
  if (C23_MODE == C23_TO_COL30) begin : g_col30
    logic k30, k31;
    assign y[29:24] = p3[13:8];
    full_adder #(.APPROX(1'b0)) u_fa30 (
      .a(p3[14]), .b(carry[23]), .cin(cout[23]), .sum(y[30]), .cout(k30)
    );
    // k31 would weigh 2^32: it has no place in the product and is dropped.
    half_adder #(.APPROX(1'b0)) u_ha31 (
      .a(p3[15]), .b(k30), .sum(y[31]), .cout(k31)
    );
  end else if (C23_MODE == C23_DROP) begin : g_drop
    assign y[31:24] = p3[15:8];
  end else begin : g_col24
    assign y[31:24] = p3[15:8] + {7'd0, carry[23]} + {7'd0, cout[23]};
  end

endmodule
