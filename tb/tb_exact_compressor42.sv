// tb_exact_compressor42: exhaustive test of the exact 4:2 compressor. For all
// 32 input combinations it checks x1+x2+x3+x4+cin = sum + 2*(carry+cout), the
// individual outputs against the reference, and that cout does not depend on
// cin (the property that keeps a row of these cells free of carry ripple).
module tb_exact_compressor42;
  import dq_pkg::*;
  import dq_ref_pkg::*;

  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  logic cout_cin0;

  exact_compressor42 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmp_out_t e;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      e = ref_cmp(DQ_C1, 1'b0, x1, x2, x3, x4, cin);
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)) begin
        failures++;
        $display("FAIL value v=%b sum=%b carry=%b cout=%b", 5'(v), sum, carry, cout);
      end
      checks++;
      if ({sum, carry, cout} != e) begin
        failures++;
        $display("FAIL outputs v=%b got %b%b%b exp %b", 5'(v), sum, carry, cout, e);
      end
      if (!cin) cout_cin0 = cout;
      else begin
        checks++;
        if (cout != cout_cin0) begin
          failures++;
          $display("FAIL cout depends on cin v=%b", 5'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
