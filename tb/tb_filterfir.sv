// tb_filterfir: end-to-end test of the 5-tap FIR filter at its default
// parameters (8-bit data, DQ4:2C4 compressors).
//
// A cycle-level model keeps the last five input samples and forms
//   y[n] = sum_k h_k * x[n-k]  (low 8 bits),
// with each product taken from the exact product (app = 0) or from the
// reference model of the approximate multiplier (app = 1); dataout must equal
// y[n] one clock after x[n] is sampled, every clock.
//
// Phases:
//  1. reset;
//  2. the published example: x held at 10, h0..h4 = 5,4,3,2,1, exact mode;
//     the output must settle at 150 after five samples (and, when the
//     example starts from reset, the build-up 50, 90, 120, 140 on the way);
//  3. random samples and coefficients in exact mode;
//  4. random samples with the accuracy mode switched at random;
//  5. a reset in the middle of a stream, then the example in approximate
//     mode and once more, without a reset, in exact mode.
// Mechanisms counted (each must happen at least once): reset, exact-mode
// output, approximate-mode output, a change of app between samples, an
// approximate output that differs from the exact filter output.
module tb_filterfir;
  import dq_pkg::*;
  import dq_ref_pkg::*;

  logic clk = 0, rst, app;
  logic [7:0] x, h0, h1, h2, h3, h4, dataout;
  int checks = 0, failures = 0;

  filterfir dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] hist [5];       // hist[k] = x[n-k] as the filter sees it
  logic       last_app;
  int n_reset = 0, n_exact = 0, n_approx = 0, n_switch = 0, n_differs = 0;

  // Applies one sample (with the present coefficients and mode), advances the
  // model and checks dataout one clock later.
  task automatic sample(input logic [7:0] tx, input logic tapp, output logic [7:0] y);
    logic [7:0]  hk [5];
    logic [15:0] acc, acc_exact;
    x = tx; app = tapp;
    hk = '{h0, h1, h2, h3, h4};
    for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = tx;
    acc = '0; acc_exact = '0;
    for (int k = 0; k < 5; k++) begin
      acc       += tapp ? ref_mult(DQ_C4, 1'b1, hk[k], hist[k]) : 16'(hk[k]) * 16'(hist[k]);
      acc_exact += 16'(hk[k]) * 16'(hist[k]);
    end
    if (tapp != last_app) n_switch++;
    last_app = tapp;
    if (tapp) n_approx++; else n_exact++;
    if (tapp && acc[7:0] != acc_exact[7:0]) n_differs++;
    @(posedge clk); #1;
    y = dataout;
    checks++;
    if (dataout !== acc[7:0]) begin
      failures++;
      if (failures < 20) $display("FAIL app=%b x=%0d: dataout=%0d exp %0d", tapp, tx, dataout, acc[7:0]);
    end
  endtask

  task automatic do_reset();
    rst = 1;
    @(posedge clk); #1;
    n_reset++;
    checks++;
    if (dataout !== 8'd0) begin failures++; $display("FAIL reset dataout=%0d", dataout); end
    for (int k = 0; k < 5; k++) hist[k] = '0;
    rst = 0;
  endtask

  task automatic paper_example(input logic tapp, input logic after_reset);
    logic [7:0] y;
    h0 = 8'd5; h1 = 8'd4; h2 = 8'd3; h3 = 8'd2; h4 = 8'd1;
    for (int i = 0; i < 8; i++) begin
      sample(8'd10, tapp, y);
      if (!tapp && after_reset && i < 5) begin
        checks++;
        if (y != 8'(10 * (5 + (i >= 1 ? 4 : 0) + (i >= 2 ? 3 : 0) + (i >= 3 ? 2 : 0) + (i >= 4 ? 1 : 0)))) begin
          failures++;
          $display("FAIL build-up step %0d: %0d", i, y);
        end
      end
    end
    if (!tapp) begin
      checks++;
      if (y != 8'd150) begin failures++; $display("FAIL steady state %0d, expected 150", y); end
    end
    $display("example x=10, h=5,4,3,2,1, app=%b: steady output %0d", tapp, y);
  endtask

  initial begin
    logic [7:0] y;
    last_app = 1'b0;
    app = 0; x = 8'd33; {h0, h1, h2, h3, h4} = '0;
    do_reset();

    paper_example(1'b0, 1'b1);

    for (int i = 0; i < 300; i++) begin
      if (i % 50 == 0) {h0, h1, h2, h3, h4} = 40'({$urandom, $urandom});
      sample(8'($urandom), 1'b0, y);
    end

    for (int i = 0; i < 600; i++) begin
      if (i % 40 == 0) {h0, h1, h2, h3, h4} = 40'({$urandom, $urandom});
      sample(8'($urandom), ($urandom % 3) != 0, y);
    end

    do_reset();
    paper_example(1'b1, 1'b1);
    paper_example(1'b0, 1'b0);

    $display("mechanisms: resets=%0d exact=%0d approximate=%0d mode_switches=%0d approx_differs=%0d",
             n_reset, n_exact, n_approx, n_switch, n_differs);
    if (n_reset == 0)   begin failures++; $display("FAIL no reset");                end
    if (n_exact == 0)   begin failures++; $display("FAIL no exact-mode sample");    end
    if (n_approx == 0)  begin failures++; $display("FAIL no approximate sample");   end
    if (n_switch == 0)  begin failures++; $display("FAIL no mode switch");          end
    if (n_differs == 0) begin failures++; $display("FAIL approximation never seen"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
