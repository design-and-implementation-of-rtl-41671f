// tb_compressor4_2_tree: checks the compressor-chain adder against a + b
// (mod 2^16) for corner operands (carry through all columns, wrap-around) and
// for random operands.
module tb_compressor4_2_tree;
  logic [15:0] a, b, s;
  int checks = 0, failures = 0;

  compressor4_2_tree #(.WIDTH(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] ta, input logic [15:0] tb);
    logic [16:0] full;
    a = ta; b = tb;
    #1;
    full = {1'b0, ta} + {1'b0, tb};
    checks++;
    if (s !== full[15:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, got %h", ta, tb, full[15:0], s);
    end
  endtask

  initial begin
    check(16'h0000, 16'h0000);
    check(16'hFFFF, 16'h0001);
    check(16'hFFFF, 16'hFFFF);
    check(16'h7FFF, 16'h0001);
    check(16'hAAAA, 16'h5555);
    check(16'h5555, 16'h5555);
    for (int i = 0; i < 5000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
