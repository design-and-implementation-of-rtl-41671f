// tb_multiplier32: the multiplier at 32 x 32 bits (the wider configuration in
// which the compressors are also evaluated), one instance per compressor
// structure. Random operands, including all-ones and single-bit corner
// cases, in exact mode (prod must equal a*b) and in approximate mode (prod
// must match the column-by-column reference model), with the mode changing
// at random between consecutive operand pairs. The mean relative error of
// each structure in approximate mode is printed.
module tb_multiplier32;
  import dq_pkg::*;
  import dq_ref_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst, app;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] prod [4];
  int checks = 0, failures = 0;

  multiplier #(.N(N), .DQ_TYPE(DQ_C1)) u_c1 (.clk, .rst, .app, .a, .b, .prod(prod[0]));
  multiplier #(.N(N), .DQ_TYPE(DQ_C2)) u_c2 (.clk, .rst, .app, .a, .b, .prod(prod[1]));
  multiplier #(.N(N), .DQ_TYPE(DQ_C3)) u_c3 (.clk, .rst, .app, .a, .b, .prod(prod[2]));
  multiplier #(.N(N), .DQ_TYPE(DQ_C4)) u_c4 (.clk, .rst, .app, .a, .b, .prod(prod[3]));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam dq_type_e TYPES [4] = '{DQ_C1, DQ_C2, DQ_C3, DQ_C4};
  real sum_red [4];
  int  n_approx = 0;

  task automatic step(input logic [N-1:0] ta, input logic [N-1:0] tb, input logic tapp);
    logic [2*N-1:0] e, exact;
    a = ta; b = tb; app = tapp;
    exact = 64'(ta) * 64'(tb);
    @(posedge clk); #1;
    if (tapp) n_approx++;
    for (int t = 0; t < 4; t++) begin
      e = tapp ? ref_mult_n(TYPES[t], 1'b1, N, ta, tb) : exact;
      checks++;
      if (prod[t] !== e) begin
        failures++;
        if (failures < 20)
          $display("FAIL C%0d app=%b %h*%h: got %h exp %h", t + 1, tapp, ta, tb, prod[t], e);
      end
      if (tapp && exact != 0)
        sum_red[t] += (real'(exact) - real'(prod[t])) / real'(exact);
    end
  endtask

  initial begin
    for (int t = 0; t < 4; t++) sum_red[t] = 0.0;
    rst = 1; app = 0; a = '1; b = '1;
    @(posedge clk); #1;
    rst = 0;
    step('1, '1, 1'b0);
    step('1, 32'd1, 1'b0);
    step(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 3000; i++)
      step($urandom, $urandom, 1'($urandom));
    for (int t = 0; t < 4; t++)
      $display("DQ4:2C%0d 32x32 approximate mode: mean relative error %f", t + 1, sum_red[t] / real'(n_approx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
