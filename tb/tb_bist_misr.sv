// tb_bist_misr: feeds random words into the MISR and compares the signature
// with a reference after every clock; checks hold and clear.
module tb_bist_misr;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [15:0] din = '0, sig, exp_sig;
  int checks = 0, failures = 0;

  bist_misr dut (.clk, .rst_n, .clear, .en, .din, .sig);

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
    exp_sig = 16'h0000;
    for (int i = 0; i < 500; i++) begin
      din = 16'($urandom);
      en  = ($urandom % 4) != 0;
      @(negedge clk);
      if (en) exp_sig = ref_misr(exp_sig, din);
      checks++;
      if (sig !== exp_sig) begin failures++; $display("FAIL i=%0d sig=%h exp=%h", i, sig, exp_sig); end
    end
    en = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (sig !== 16'h0000) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
