// amul_pkg: shared types for the truncated / approximate / exact multipliers.
//
// The only shared item is the choice of where the 16x16 multiplier puts the
// carries that leave its column 23 (the last column of its exact 4:2 row).
// The default, C23_TO_COL30, is the described arrangement: the carries skip
// columns 24..29 and are added at column 30 by an exact full adder.  The two
// other settings are offered for comparison and are this design's own:
// C23_DROP discards the carries, C23_TO_COL24 adds them at their true weight.
package amul_pkg;

  typedef enum logic [1:0] {
    C23_TO_COL30 = 2'd0,
    C23_DROP     = 2'd1,
    C23_TO_COL24 = 2'd2
  } c23_mode_e;

endpackage
