// tb_DFF: checks that the register delays random data by exactly one clock
// and that a synchronous reset clears it.
module tb_DFF;
  logic clk = 0, rst;
  logic [7:0] d, q, prev;
  int checks = 0, failures = 0;

  DFF #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 8'hA5;
    @(posedge clk); #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      d = 8'($urandom);
      prev = d;
      if (i == 100) rst = 1;
      @(posedge clk); #1;
      checks++;
      if (q !== (rst ? 8'h00 : prev)) begin
        failures++;
        $display("FAIL cycle %0d q=%h exp %h", i, q, rst ? 8'h00 : prev);
      end
      rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
