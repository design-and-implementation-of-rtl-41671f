// tb_multiplier: tests the 8x8 dual-quality multiplier, one instance for each
// of the four compressor structures (the DQ_C4 one at the module's defaults).
//
//  * Exact mode: all 65536 operand pairs, prod must equal a*b.
//  * Approximate mode: all 65536 pairs, prod must match the column-by-column
//    reference model; the error statistics of each structure are printed.
//  * Mode switching: random operands with app changing every cycle.
//  * Timing: operands are applied one pair per clock and each product must
//    appear exactly one clock after its operands were sampled; a synchronous
//    reset must clear prod.
module tb_multiplier;
  import dq_pkg::*;
  import dq_ref_pkg::*;

  logic clk = 0, rst, app;
  logic [7:0]  a, b;
  logic [15:0] prod [4];
  int checks = 0, failures = 0;

  multiplier #(.N(8), .DQ_TYPE(DQ_C1)) u_c1 (.clk, .rst, .app, .a, .b, .prod(prod[0]));
  multiplier #(.N(8), .DQ_TYPE(DQ_C2)) u_c2 (.clk, .rst, .app, .a, .b, .prod(prod[1]));
  multiplier #(.N(8), .DQ_TYPE(DQ_C3)) u_c3 (.clk, .rst, .app, .a, .b, .prod(prod[2]));
  multiplier                           u_c4 (.clk, .rst, .app, .a, .b, .prod(prod[3]));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam dq_type_e TYPES [4] = '{DQ_C1, DQ_C2, DQ_C3, DQ_C4};
  int   n_wrong [4];
  real  sum_red [4];

  // Applies one operand pair, waits one clock and checks all four products.
  task automatic step(input logic [7:0] ta, input logic [7:0] tb, input logic tapp);
    logic [15:0] e;
    a = ta; b = tb; app = tapp;
    @(posedge clk); #1;
    for (int t = 0; t < 4; t++) begin
      e = tapp ? ref_mult(TYPES[t], 1'b1, ta, tb) : 16'(ta) * 16'(tb);
      checks++;
      if (prod[t] !== e) begin
        failures++;
        if (failures < 20)
          $display("FAIL C%0d app=%b %0d*%0d: got %0d exp %0d", t + 1, tapp, ta, tb, prod[t], e);
      end
      if (tapp && prod[t] != 16'(ta) * 16'(tb)) begin
        n_wrong[t]++;
        sum_red[t] += (real'(int'(ta) * int'(tb)) - real'(prod[t])) / real'(int'(ta) * int'(tb));
      end
    end
  endtask

  initial begin
    rst = 1; app = 0; a = 8'd200; b = 8'd200;
    @(posedge clk); #1;
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (prod[t] !== 16'd0) begin failures++; $display("FAIL reset C%0d", t + 1); end
    end
    rst = 0;

    // The two operand pairs shown in the published waveform.
    step(8'd8, 8'd9, 1'b0);
    checks++;
    if (prod[3] !== 16'd72) begin failures++; $display("FAIL 8*9"); end
    step(8'd10, 8'd10, 1'b0);

    for (int v = 0; v < 65536; v++) step(v[15:8], v[7:0], 1'b0);
    for (int t = 0; t < 4; t++) begin n_wrong[t] = 0; sum_red[t] = 0.0; end
    for (int v = 0; v < 65536; v++) step(v[15:8], v[7:0], 1'b1);
    for (int t = 0; t < 4; t++)
      $display("DQ4:2C%0d approximate mode: %0d of 65536 products wrong, mean relative error %f",
               t + 1, n_wrong[t], sum_red[t] / 65536.0);
    // Some structure must actually be inexact, and the approximation must
    // never make every product wrong.
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (n_wrong[t] == 0 || n_wrong[t] == 65536) begin
        failures++;
        $display("FAIL C%0d approximate mode wrong count %0d", t + 1, n_wrong[t]);
      end
    end

    // Run-time mode switching, and a reset in the middle of the stream.
    for (int i = 0; i < 4000; i++) begin
      if (i == 2000) begin
        rst = 1;
        @(posedge clk); #1;
        for (int t = 0; t < 4; t++) begin
          checks++;
          if (prod[t] !== 16'd0) begin failures++; $display("FAIL mid reset C%0d", t + 1); end
        end
        rst = 0;
      end
      step(8'($urandom), 8'($urandom), 1'($urandom));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
