// approx_mul8: 8x8 unsigned approximate multiplier, y ~ a * b, with all
// partial-product reduction done in one stage of column compressors and no
// final carry-propagate adder.
//
// The 16 product columns fall into three regions:
//   * Truncated, columns 0..5: no partial products are formed for columns
//     0..4; y[5:0] is the constant 6'b000110.  The six bits of column 5 are
//     formed only for error compensation: rows 0..2 are ORed into an extra
//     bit of column 6 and rows 3..5 into an extra bit of column 8.
//   * Approximate, columns 6..8: each column (7 or 8 partial products plus
//     the compensation bit) goes into an approximate 8:2 compressor whose
//     sum is the product bit.  The carries of the three compressors are ORed
//     into one compensation bit that enters column 9.
//   * Exact, columns 9..15: each column is reduced to one product bit by an
//     exact compressor that takes the column's partial products and every
//     carry of the column below; its carries all go to the column above.
//     Columns 9 and 10 use a 7:2 and a 6:2 as described; the carries they
//     pass up make columns 11..14 need a 6:2, a 5:2, a 4:2 and a full adder,
//     whose carry is y[15].  This region is exact: y[15:9]
//     equals the true sum of the partial products of columns 9..14 plus the
//     compensation bit, which always fits in seven bits.
// The described reduction passes a single carry from column to column and
// names a 7:2, 6:2, 5:2, 4:2, full adder and half adder for columns 9..14; a
// single carry cannot hold the column totals, so the exact compressors here
// pass all their carries upward and, from column 11 on, are sized to the
// bits they receive.  The
// order in which the bits of a column enter a compressor (row 0 first, the
// compensation bit last) is also this design's choice; it matters only in
// the approximate region.
// An assertion checks that carry[3] of the column-9 7:2, fed only by zeroed
// carry-ins, stays zero; it is the one carry not passed on.
// Interface: a, b unsigned 8 bits; y 16 bits.  Purely combinational.
module approx_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] y
);

  // Partial products a[i] & b[j] of column c = i + j, indexed by row j.
  logic [5:0] col5;
  logic [6:0] col6;
  logic [7:0] col7;
  logic [7:1] col8;
  logic [7:2] col9;
  logic [7:3] col10;
  logic [7:4] col11;
  logic [7:5] col12;
  logic [7:6] col13;
  logic       col14;

  always_comb begin
    for (int j = 0; j <= 5; j++) col5[j]  = a[5 - j] & b[j];
    for (int j = 0; j <= 6; j++) col6[j]  = a[6 - j] & b[j];
    for (int j = 0; j <= 7; j++) col7[j]  = a[7 - j] & b[j];
    for (int j = 1; j <= 7; j++) col8[j]  = a[8 - j] & b[j];
    for (int j = 2; j <= 7; j++) col9[j]  = a[9 - j] & b[j];
    for (int j = 3; j <= 7; j++) col10[j] = a[10 - j] & b[j];
    for (int j = 4; j <= 7; j++) col11[j] = a[11 - j] & b[j];
    for (int j = 5; j <= 7; j++) col12[j] = a[12 - j] & b[j];
    for (int j = 6; j <= 7; j++) col13[j] = a[13 - j] & b[j];
    col14 = a[7] & b[7];
  end

  // ---- Truncated region and its compensation bits ----------------------
  localparam logic [5:0] TRUNC_CONST = 6'b000110;

  logic comp6, comp8;
  assign comp6 = |col5[2:0];
  assign comp8 = |col5[5:3];

  // ---- Approximate region: three approximate 8:2 compressors -----------
  logic [5:0] ac6, ac7, ac8;
  logic       comp9;

  comp82 #(.APPROX(1'b1)) u_c6 (
    .x({comp6, col6}), .cin('0), .sum(y[6]), .carry(ac6)
  );
  comp82 #(.APPROX(1'b1)) u_c7 (
    .x(col7), .cin('0), .sum(y[7]), .carry(ac7)
  );
  comp82 #(.APPROX(1'b1)) u_c8 (
    .x({comp8, col8}), .cin('0), .sum(y[8]), .carry(ac8)
  );

  assign comp9 = |{ac6, ac7, ac8};

  // ---- Exact region ------------------------------------------------------
  logic [3:0] k10, k11;
  logic [2:0] k12;
  logic [1:0] k13;

  // Column 9: six partial products + compensation bit in a 7:2.  Its
  // carry-ins are zero, which makes carry[3] (the carry of its last full
  // adder, fed by two of them) constant zero; the other four carries go up.
  logic [4:0] k9;
  comp72 #(.APPROX(1'b0)) u_c9 (
    .x({comp9, col9}), .cin('0), .sum(y[9]), .carry(k9)
  );
  always_comb assert (k9[3] == 1'b0)
    else $error("approx_mul8: column-9 carry[3] must be constant zero");
  // Column 10: five partial products + four live carries = 9 bits in a 6:2.
  comp62 #(.APPROX(1'b0)) u_c10 (
    .x({k9[0], col10}), .cin({k9[4], k9[2:1]}), .sum(y[10]), .carry(k10)
  );
  // Column 11: four partial products + four carries = 8 bits.
  comp62 #(.APPROX(1'b0)) u_c11 (
    .x({k10[1:0], col11}), .cin({1'b0, k10[3:2]}), .sum(y[11]), .carry(k11)
  );
  // Column 12: three partial products + four carries = 7 bits.
  comp52 #(.APPROX(1'b0)) u_c12 (
    .x({k11[1:0], col12}), .cin(k11[3:2]), .sum(y[12]), .carry(k12)
  );
  // Column 13: two partial products + three carries = 5 bits.
  comp42 #(.APPROX(1'b0)) u_c13 (
    .x({k12[1:0], col13}), .cin(k12[2]),
    .sum(y[13]), .carry(k13[0]), .cout(k13[1])
  );
  // Column 14: one partial product + two carries; its carry is y[15].
  full_adder #(.APPROX(1'b0)) u_c14 (
    .a(col14), .b(k13[0]), .cin(k13[1]), .sum(y[14]), .cout(y[15])
  );

  assign y[5:0] = TRUNC_CONST;

endmodule
