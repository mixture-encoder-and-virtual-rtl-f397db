// tb_bist_lfsr: checks the LFSR state sequence against the polynomial
// x^8+x^6+x^3+x^2+1, its period of 255, hold without step, and load.
module tb_bist_lfsr;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [7:0] q, exp_q;
  int checks = 0, failures = 0;

  bist_lfsr #(.SEED(8'h01)) dut (.clk, .rst_n, .load, .step, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (q !== 8'h01) begin failures++; $display("FAIL reset state %h", q); end
    exp_q = 8'h01;
    step  = 1;
    for (int i = 1; i <= 255; i++) begin
      @(negedge clk);
      exp_q = ref_lfsr(exp_q);
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL step %0d q=%h exp=%h", i, q, exp_q); end
      if (i < 255 && q == 8'h01) begin failures++; $display("FAIL period shorter than 255"); end
    end
    checks++;
    if (q !== 8'h01) begin failures++; $display("FAIL period is not 255"); end
    step = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (q !== 8'h01) begin failures++; $display("FAIL moved without step"); end
    step = 1;
    repeat (7) @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    step = 0;
    checks++;
    if (q !== 8'h01) begin failures++; $display("FAIL load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
