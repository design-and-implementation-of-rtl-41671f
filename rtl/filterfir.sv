// filterfir: 5-tap FIR filter whose multipliers are built from dual-quality
// 4:2 compressors, so the accuracy (and in silicon the power and delay) of the
// whole filter can be switched at run time.
//
//   y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3] + h4*x[n-4]
//
// Structure (direct form):
//   * four DFF stages hold x[n-1] .. x[n-4];
//   * five multiplier instances form h_k * x[n-k] and register it;
//   * four compressor4_2_tree adders in a chain sum the five products;
//   * dataout is the low DATA_W bits of that sum.
// In exact mode (app = 0) dataout equals the exact y[n] modulo 2^DATA_W. In
// approximate mode (app = 1) every multiplier uses the approximate parts of its
// compressors; the adder chain is always exact.
//
// Interface and timing: x, h0..h4 and app are sampled at the rising clk edge;
// dataout reflects that sample right after the same edge (one cycle latency),
// and a new sample is accepted every cycle. rst (synchronous, active high)
// clears the delay line and the product registers, so dataout is 0 after
// reset and then builds up tap by tap.
//
// The block list (DFF delay line, five multipliers, chained
// compressor4_2_tree adders), the port names and the 8-bit widths follow the
// published design. The app input is added here so that the multipliers'
// accuracy mode can be driven from outside; keeping only the low 8 bits of
// the sum, the reset style and the choice of compressor structure (DQ_TYPE)
// are this design's choices.
module filterfir
  import dq_pkg::*;
#(
  parameter int       DATA_W  = 8,
  parameter dq_type_e DQ_TYPE = DQ_C4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              app,
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] h0,
  input  logic [DATA_W-1:0] h1,
  input  logic [DATA_W-1:0] h2,
  input  logic [DATA_W-1:0] h3,
  input  logic [DATA_W-1:0] h4,
  output logic [DATA_W-1:0] dataout
);
  localparam int TAPS = 5;
  localparam int PW   = 2 * DATA_W;

  logic [DATA_W-1:0] xd [TAPS];   // xd[k] = x[n-k]
  logic [DATA_W-1:0] h  [TAPS];
  logic [PW-1:0]     p  [TAPS];   // registered products
  logic [PW-1:0]     acc[TAPS];   // acc[k] = p[0] + ... + p[k]

  assign h[0] = h0;
  assign h[1] = h1;
  assign h[2] = h2;
  assign h[3] = h3;
  assign h[4] = h4;

  assign xd[0] = x;

  for (genvar k = 1; k < TAPS; k++) begin : g_delay
    DFF #(.WIDTH(DATA_W)) u_dff (.clk(clk), .rst(rst), .d(xd[k-1]), .q(xd[k]));
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    multiplier #(.N(DATA_W), .DQ_TYPE(DQ_TYPE)) u_mul (
      .clk(clk), .rst(rst), .app(app), .a(h[k]), .b(xd[k]), .prod(p[k])
    );
  end

  assign acc[0] = p[0];

  for (genvar k = 1; k < TAPS; k++) begin : g_add
    compressor4_2_tree #(.WIDTH(PW)) u_add (.a(acc[k-1]), .b(p[k]), .s(acc[k]));
  end

  assign dataout = acc[TAPS-1][DATA_W-1:0];

  logic unused_msbs;
  assign unused_msbs = ^acc[TAPS-1][PW-1:DATA_W];
endmodule
