// compressor_row: reduces four aligned W-bit operands to two with one row of
// dual-quality 4:2 compressors, one per bit column.
//
// Column i compresses a[i], b[i], c[i], d[i] and the cout of column i-1 (0 for
// column 0). Its sum is bit i of s; its carry is bit i+1 of t. The cout of the
// top column and the carry of the top column fall off, so in the exact mode
// s + t = a + b + c + d (mod 2^W). Because a compressor's cout never depends
// on its cin, the row has no carry ripple: its delay is that of one cell.
// In the approximate mode (app = 1) each cell computes its approximate
// function and s + t is only an estimate. Purely combinational.
module compressor_row
  import dq_pkg::*;
#(
  parameter int       W       = 16,
  parameter dq_type_e DQ_TYPE = DQ_C4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic         app,
  output logic [W-1:0] s,
  output logic [W-1:0] t
);
  logic [W:0]   cchain;   // cchain[i] is the cin of column i
  logic [W-1:0] carry;

  assign cchain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    dq_compressor42 #(.DQ_TYPE(DQ_TYPE)) u_cmp (
      .x1(a[i]), .x2(b[i]), .x3(c[i]), .x4(d[i]), .cin(cchain[i]), .app(app),
      .sum(s[i]), .carry(carry[i]), .cout(cchain[i+1])
    );
  end

  // Carries move one column up; the top column's carry and cout are dropped.
  assign t = {carry[W-2:0], 1'b0};

  logic unused_top;
  assign unused_top = ^{carry[W-1], cchain[W]};
endmodule
