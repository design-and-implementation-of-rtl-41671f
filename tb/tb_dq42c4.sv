// tb_dq42c4: exhaustive test of the dual-quality compressor DQ4:2C4.
// Exact mode (app = 0): all 32 input combinations must compress exactly.
// Approximate mode (app = 1): the outputs must match the reference approximate
// function for all 32 combinations, and over the 16 combinations of x1..x4
// (cin = 0) the result sum + 2*(carry + cout) must be wrong in exactly
// 5 cases, the 31.25% error rate of this structure. The test also
// switches the mode back and forth on one input to see the outputs follow app.
module tb_dq42c4;
  import dq_pkg::*;
  import dq_ref_pkg::*;

  logic x1, x2, x3, x4, cin, app, sum, carry, cout;
  int checks = 0, failures = 0;
  int wrong = 0;

  dq42c4 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmp_out_t e;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 32; v++) begin
        app = m[0];
        {x1, x2, x3, x4, cin} = 5'(v);
        #1;
        e = ref_cmp(DQ_C4, app, x1, x2, x3, x4, cin);
        checks++;
        if ({sum, carry, cout} != e) begin
          failures++;
          $display("FAIL app=%b v=%b got %b%b%b exp %b", app, 5'(v), sum, carry, cout, e);
        end
        if (!app) begin
          checks++;
          if (int'(sum) + 2 * (int'(carry) + int'(cout)) != int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)) begin
            failures++;
            $display("FAIL exact value v=%b", 5'(v));
          end
        end else if (!cin) begin
          if (int'(sum) + 2 * (int'(carry) + int'(cout)) != int'(x1) + int'(x2) + int'(x3) + int'(x4))
            wrong++;
        end
      end
    end
    checks++;
    if (wrong != 5) begin
      failures++;
      $display("FAIL approximate error count %0d, expected 5", wrong);
    end
    // Mode switch on a fixed input where the two modes differ: 1111 + cin 0.
    {x1, x2, x3, x4, cin} = 5'b11110;
    for (int k = 0; k < 4; k++) begin
      app = k[0];
      #1;
      checks++;
      if ({sum, carry, cout} != ref_cmp(DQ_C4, app, x1, x2, x3, x4, cin)) begin
        failures++;
        $display("FAIL mode switch app=%b", app);
      end
    end
    $display("approximate mode: %0d of 16 results wrong", wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
