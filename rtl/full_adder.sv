// full_adder: one-bit full adder, a + b + ci = s + 2*co. Purely combinational.
// Building block of the exact 4:2 compressor.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
