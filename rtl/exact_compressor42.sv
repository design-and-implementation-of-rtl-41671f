// exact_compressor42: exact 4:2 compressor, the "supplementary part" of every
// dual-quality compressor.
//
// Five bits of one column are compressed into one bit of the same weight (sum)
// and two bits of the next weight (carry, cout):
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// It is the usual cascade of two full adders: the first adds x1, x2, x3 and
// produces cout, which therefore never depends on cin, so a horizontal chain
// of these cells (cout of column i into cin of column i+1) has no ripple
// path. The second full adder adds the first one's sum, x4 and cin.
// Purely combinational. The two-full-adder form is this design's choice; the
// structure is only identified as an exact 4:2 compressor.
module exact_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .ci(x3),  .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .ci(cin), .s(sum), .co(carry));
endmodule
