// amul_ref_pkg: reference models for the testbenches.
//
// These functions compute, bit by bit from the arithmetic rules of each
// region, what the approximate multipliers must return, without using any of
// the RTL cells:
//   * the approximate full adder is sum = a|b|c, cout = c, so any chain of
//     them yields the OR of its inputs as sum and forwards chosen inputs as
//     carries;
//   * the exact regions are plain integer sums of partial products.
// They also report which error-compensation mechanisms an operand pair
// triggers, so a testbench can show each one was exercised.
package amul_ref_pkg;

  typedef struct packed {
    logic comp6;   // column-5 rows 0..2 compensation bit is 1
    logic comp8;   // column-5 rows 3..5 compensation bit is 1
    logic comp9;   // ORed approximate-region carries entering column 9
  } mul8_events_t;

  function automatic logic pp(input logic [7:0] a, input logic [7:0] b,
                              input int col, input int row);
    return a[col - row] & b[row];
  endfunction

  function automatic logic [15:0] ref_mul8(input logic [7:0] a,
                                           input logic [7:0] b,
                                           output mul8_events_t ev);
    logic [15:0] y;
    logic c6, c8, c9, o6, o7, o8;
    int unsigned high;
    c6 = pp(a, b, 5, 0) | pp(a, b, 5, 1) | pp(a, b, 5, 2);
    c8 = pp(a, b, 5, 3) | pp(a, b, 5, 4) | pp(a, b, 5, 5);
    o6 = c6; o7 = 1'b0; o8 = c8;
    for (int j = 0; j <= 6; j++) o6 |= pp(a, b, 6, j);
    for (int j = 0; j <= 7; j++) o7 |= pp(a, b, 7, j);
    for (int j = 1; j <= 7; j++) o8 |= pp(a, b, 8, j);
    // An approximate 8:2 with zero carry-ins forwards its inputs 2, 5, 7.
    c9 = pp(a, b, 6, 2) | pp(a, b, 6, 5) | c6 |
         pp(a, b, 7, 2) | pp(a, b, 7, 5) | pp(a, b, 7, 7) |
         pp(a, b, 8, 3) | pp(a, b, 8, 6) | c8;
    high = 32'(c9);
    for (int col = 9; col <= 14; col++)
      for (int j = col - 7; j <= 7; j++)
        high += int'(pp(a, b, col, j)) << (col - 9);
    y[5:0]  = 6'b000110;
    y[6]    = o6;
    y[7]    = o7;
    y[8]    = o8;
    y[15:9] = high[6:0];
    ev.comp6 = c6;
    ev.comp8 = c8;
    ev.comp9 = c9;
    return y;
  endfunction

  // mode: 0 = column-23 carries added at column 30, 1 = dropped,
  //       2 = added at column 24.
  function automatic logic [31:0] ref_mul16(input logic [15:0] a,
                                            input logic [15:0] b,
                                            input int mode,
                                            output int c23);
    logic [15:0] p0, p1, p2, p3;
    mul8_events_t ev;
    logic [31:0] y;
    logic car, cot, ncar, ncot;
    int unsigned s;
    p0 = ref_mul8(a[7:0],  b[7:0],  ev);
    p1 = ref_mul8(a[15:8], b[7:0],  ev);
    p2 = ref_mul8(a[7:0],  b[15:8], ev);
    p3 = ref_mul8(a[15:8], b[15:8], ev);
    y[7:0] = p0[7:0];
    y[8] = p0[8] | p1[0] | p2[0];
    car = p2[0];
    cot = 1'b0;
    for (int c = 9; c <= 15; c++) begin
      y[c] = p0[c] | p1[c-8] | p2[c-8] | car | cot;
      ncar = cot;
      ncot = p2[c-8];
      car = ncar;
      cot = ncot;
    end
    s = int'(p1[15:8]) + int'(p2[15:8]) + int'(p3[7:0]) + int'(car) + int'(cot);
    y[23:16] = s[7:0];
    c23 = int'(s >> 8);
    case (mode)
      0: begin
        y[29:24] = p3[13:8];
        y[31:30] = 2'(int'(p3[15:14]) + c23);
      end
      1: y[31:24] = p3[15:8];
      default: y[31:24] = 8'(int'(p3[15:8]) + c23);
    endcase
    return y;
  endfunction

endpackage
