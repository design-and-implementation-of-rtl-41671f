// dq_ref_pkg: reference models used by the testbenches. They are written from
// the arithmetic definition of each cell, not from its gate structure:
//   * ref_cmp:  one 4:2 compressor (exact or one of the four approximate parts)
//   * ref_mult_n / ref_mult: the compressor-row multiplier, bit column by
//     bit column, for an n x n and for the 8 x 8 case
package dq_ref_pkg;
  import dq_pkg::*;

  typedef struct packed {
    logic sum;
    logic carry;
    logic cout;
  } cmp_out_t;

  // Exact: cout is the weight-2 part of x1+x2+x3, the rest of the total
  // (x1+..+x4+cin - 2*cout, at most 3) is split into carry and sum.
  function automatic cmp_out_t ref_cmp(dq_type_e t, logic app,
                                       logic x1, logic x2, logic x3, logic x4, logic cin);
    cmp_out_t o;
    int unsigned ones3, rest;
    if (!app) begin
      ones3  = int'(x1) + int'(x2) + int'(x3);
      o.cout = (ones3 >= 2);
      rest   = ones3 + int'(x4) + int'(cin) - 2 * int'(o.cout);
      o.carry = (rest >= 2);
      o.sum   = rest[0];
    end else begin
      // sum' of C3/C4 is 1 unless the pairs (x1,x2) and (x3,x4) are both equal.
      // carry' of C4 is 1 when either pair is 11.
      o.cout = (t == DQ_C2) ? x3 : 1'b0;
      if (t == DQ_C1 || t == DQ_C2) o.sum = x1;
      else                          o.sum = !((x1 == x2) && (x3 == x4));
      if (t == DQ_C4) o.carry = ({x1, x2} == 2'b11) || ({x3, x4} == 2'b11);
      else            o.carry = x4;
    end
    return o;
  endfunction

  // Rows of partial products are reduced four at a time into two rows, each
  // column with one compressor fed by the cout of the column below, until two
  // rows remain; those are added. n is the operand width (a power of two from
  // 4 to 32); operand bits at and above n must be zero.
  function automatic logic [63:0] ref_mult_n(dq_type_e t, logic app, int n,
                                             logic [31:0] a, logic [31:0] b);
    logic [63:0] rows [32];
    logic [63:0] nxt  [32];
    int nrows;
    cmp_out_t o;
    logic cin;
    for (int j = 0; j < n; j++) rows[j] = b[j] ? (64'(a) << j) : 64'd0;
    nrows = n;
    while (nrows > 2) begin
      for (int g = 0; g < nrows / 4; g++) begin
        nxt[2*g]   = '0;
        nxt[2*g+1] = '0;
        cin = 1'b0;
        for (int i = 0; i < 2 * n; i++) begin
          o = ref_cmp(t, app, rows[4*g][i], rows[4*g+1][i], rows[4*g+2][i], rows[4*g+3][i], cin);
          nxt[2*g][i] = o.sum;
          if (i < 2 * n - 1) nxt[2*g+1][i+1] = o.carry;
          cin = o.cout;
        end
      end
      nrows = nrows / 2;
      for (int r = 0; r < nrows; r++) rows[r] = nxt[r];
    end
    return (rows[0] + rows[1]) & ((64'd1 << (2 * n)) - 64'd1);
  endfunction

  // The 8x8 case.
  function automatic logic [15:0] ref_mult(dq_type_e t, logic app, logic [7:0] a, logic [7:0] b);
    return 16'(ref_mult_n(t, app, 8, 32'(a), 32'(b)));
  endfunction
endpackage
