// multiplier: N x N unsigned multiplier with a run-time selectable accuracy.
//
// The N partial products a & {N{b[j]}} << j are reduced by rows of
// dual-quality 4:2 compressors (compressor_row): every stage turns each group
// of four rows into two, so the row count goes N -> N/2 -> ... -> 2
// (8 -> 4 -> 2 for the default N = 8, the height sequence of a Dadda-style
// reduction built from 4:2 compressors). A carry-propagate adder adds the last
// two rows, and the product is registered.
//
// app = 0: every compressor is exact and prod = a * b.
// app = 1: every compressor uses its approximate part (structure DQ_TYPE), so
//          the reduction is faster and cheaper but prod is an estimate. app
//          may change on any cycle; it takes effect with the operands it is
//          sampled with.
//
// Interface and timing: a, b and app are sampled at a rising clk edge and the
// product of that sample is on prod right after that edge (latency 1 cycle,
// one result per cycle). rst is synchronous and active high and clears prod.
//
// N = 8 and the port list follow the published 8x8 design. The full-row
// placement of the compressors (a cell in every column of every row, with
// constant-zero inputs outside the partial-product parallelogram), the
// single output register, the final adder and the choice of DQ_C4 as default
// structure are this design's own choices. N must be a power of two, at least 4.
module multiplier
  import dq_pkg::*;
#(
  parameter int       N       = 8,
  parameter dq_type_e DQ_TYPE = DQ_C4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           app,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] prod
);
  localparam int PW     = 2 * N;
  localparam int STAGES = $clog2(N) - 1;

  logic [PW-1:0] pp [N];   // shifted partial products

  for (genvar j = 0; j < N; j++) begin : g_pp
    assign pp[j] = PW'(a & {N{b[j]}}) << j;
  end

  // Stage s turns its N >> s input rows into N >> (s+1) output rows.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int RIN = N >> s;
    logic [PW-1:0] rin  [RIN];
    logic [PW-1:0] rout [RIN/2];

    if (s == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_stage[s-1].rout;
    end

    for (genvar g = 0; g < RIN / 4; g++) begin : g_grp
      compressor_row #(.W(PW), .DQ_TYPE(DQ_TYPE)) u_row (
        .a(rin[4*g]), .b(rin[4*g+1]), .c(rin[4*g+2]), .d(rin[4*g+3]),
        .app(app),
        .s(rout[2*g]), .t(rout[2*g+1])
      );
    end
  end

  logic [PW-1:0] prod_next;
  assign prod_next = g_stage[STAGES-1].rout[0] + g_stage[STAGES-1].rout[1];

  always_ff @(posedge clk) begin
    if (rst) prod <= '0;
    else     prod <= prod_next;
  end

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $error("multiplier: N must be a power of two >= 4");
  end
endmodule
