// DFF: WIDTH-bit D register with synchronous active-high reset. q takes d at
// each rising clk edge and is cleared by rst. Four in series form the FIR
// input delay line. The reset style is this design's choice.
module DFF #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
