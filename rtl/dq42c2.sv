// dq42c2: dual-quality 4:2 compressor, structure 2 (DQ4:2C2).
//
// The cell works in one of two accuracy modes, chosen at run time by app:
//   app = 0 (exact):       the outputs come from an exact 4:2 compressor,
//                          x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
//   app = 1 (approximate): the outputs come from a small approximate part that
//                          ignores cin:
//                          sum' = x1, carry' = x4, cout' = x3.
//                          Over the 16 combinations of x1..x4 this is wrong in
//                          10 (62.5%) of the cases.
// In silicon the unused part is power gated and tri-state buffers disconnect
// the approximate outputs in the exact mode; a two-state RTL model expresses
// that as a multiplexer on the three outputs, with the same logical result.
// Purely combinational.
//
// The exact mode, the two-part structure and the error rate follow the
// published structure.
// cout' = x3 is as described for this structure. sum' = x1 and carry' = x4
// are shared with structure 1, whose wiring is this design's choice.
module dq42c2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  input  logic app,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic ex_sum, ex_carry, ex_cout;
  logic ap_sum, ap_carry, ap_cout;

  // Supplementary part: the exact compressor.
  exact_compressor42 u_exact (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
    .sum(ex_sum), .carry(ex_carry), .cout(ex_cout)
  );

  // Approximate part.
  always_comb begin
    ap_sum   = x1;
    ap_carry = x4;
    ap_cout  = x3;
  end

  // Mode select (stands for the tri-state buffers on the primary outputs).
  always_comb begin
    if (app) begin
      sum   = ap_sum;
      carry = ap_carry;
      cout  = ap_cout;
    end else begin
      sum   = ex_sum;
      carry = ex_carry;
      cout  = ex_cout;
    end
  end
endmodule
