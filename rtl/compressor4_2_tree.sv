// compressor4_2_tree: two-operand adder made of a chain of exact 4:2
// compressors, used to accumulate the FIR products.
//
// Column i compresses a[i], b[i], the carry of column i-1 (as x3) and the cout
// of column i-1 (as cin); x4 is 0. At most four of the five inputs are 1, so
// the column's value is sum + 2*(carry + cout) with both weight-2 outputs
// passed to column i+1, and the sum bits alone form s = a + b (mod 2^WIDTH).
// Purely combinational.
//
// Only the name and the position of this block (after each multiplier, in a
// chain) are given; building it as a ripple chain of exact 4:2 compressors
// with WIDTH = 16 (the product width) is this design's choice.
module compressor4_2_tree #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s
);
  logic [WIDTH:0] cy;   // carry of column i-1, fed to column i as x3
  logic [WIDTH:0] co;   // cout of column i-1, fed to column i as cin

  assign cy[0] = 1'b0;
  assign co[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    exact_compressor42 u_cmp (
      .x1(a[i]), .x2(b[i]), .x3(cy[i]), .x4(1'b0), .cin(co[i]),
      .sum(s[i]), .carry(cy[i+1]), .cout(co[i+1])
    );
  end

  logic unused_top;
  assign unused_top = cy[WIDTH] ^ co[WIDTH];
endmodule
