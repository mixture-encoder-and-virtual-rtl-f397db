// tb_output_assembler: checks that information bits are gathered from the
// right positions for both rate modes, the one-clock latency, and that the
// status fields travel with the frame.
module tb_output_assembler;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_hash_ok = 0, in_early = 0;
  logic [31:0] u_hat = '0;
  rate_e in_rate = RATE_1_2, out_rate;
  logic [1:0] in_vch = '0, out_vch;
  logic out_valid, out_hash_ok, out_early;
  logic [K_MAX-1:0] out_info;
  int checks = 0, failures = 0;

  output_assembler dut (.clk, .rst_n, .in_valid, .u_hat, .in_rate, .in_vch,
    .in_hash_ok, .in_early, .out_valid, .out_info, .out_rate, .out_vch,
    .out_hash_ok, .out_early);

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
    for (int i = 0; i < 300; i++) begin
      bit r23;
      r23 = ($urandom % 2) == 1;
      u_hat = $urandom;
      in_rate = r23 ? RATE_2_3 : RATE_1_2;
      in_vch = 2'($urandom);
      in_hash_ok = 1'($urandom);
      in_early = 1'($urandom);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_info !== ref_extract(u_hat, r23) || out_rate !== in_rate ||
          out_vch !== in_vch || out_hash_ok !== in_hash_ok || out_early !== in_early) begin
        failures++;
        $display("FAIL i=%0d info=%h exp=%h", i, out_info, ref_extract(u_hat, r23));
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
