// dq_pkg: shared types for the dual-quality 4:2 compressor multiplier and FIR filter.
//
// dq_type_e names the four dual-quality 4:2 compressor structures. In the exact
// mode all four give the same exact 4:2 compression; they differ only in the
// approximate part that drives the outputs when the mode input app is 1:
//   DQ_C1  sum'=x1,                carry'=x4,                cout'=0   (62.5% error rate)
//   DQ_C2  sum'=x1,                carry'=x4,                cout'=x3  (62.5% error rate)
//   DQ_C3  sum'=(x1^x2)|(x3^x4),   carry'=x4,                cout'=0   (50% error rate)
//   DQ_C4  sum'=(x1^x2)|(x3^x4),   carry'=(x1&x2)|(x3&x4),   cout'=0   (31.25% error rate)
// The error rates are over the 16 combinations of x1..x4 with cin ignored.
package dq_pkg;
  typedef enum logic [1:0] {
    DQ_C1 = 2'd0,
    DQ_C2 = 2'd1,
    DQ_C3 = 2'd2,
    DQ_C4 = 2'd3
  } dq_type_e;
endpackage
