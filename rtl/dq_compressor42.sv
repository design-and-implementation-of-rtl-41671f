// dq_compressor42: one dual-quality 4:2 compressor whose structure (DQ4:2C1..C4)
// is chosen by the DQ_TYPE parameter. Ports and timing are those of the chosen
// dq42cN cell: combinational, exact when app = 0, approximate when app = 1.
// This wrapper only lets the multiplier be built with any of the four cells.
module dq_compressor42
  import dq_pkg::*;
#(
  parameter dq_type_e DQ_TYPE = DQ_C4
) (
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
  if (DQ_TYPE == DQ_C1) begin : g_c1
    dq42c1 u_cell (.x1, .x2, .x3, .x4, .cin, .app, .sum, .carry, .cout);
  end else if (DQ_TYPE == DQ_C2) begin : g_c2
    dq42c2 u_cell (.x1, .x2, .x3, .x4, .cin, .app, .sum, .carry, .cout);
  end else if (DQ_TYPE == DQ_C3) begin : g_c3
    dq42c3 u_cell (.x1, .x2, .x3, .x4, .cin, .app, .sum, .carry, .cout);
  end else begin : g_c4
    dq42c4 u_cell (.x1, .x2, .x3, .x4, .cin, .app, .sum, .carry, .cout);
  end
endmodule
