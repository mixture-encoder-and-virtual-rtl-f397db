// tb_encoder_controller: checks information-bit placement for both rate
// modes against explicit index lists, frozen positions at zero, and the
// test-mode pass-through.
module tb_encoder_controller;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic test_active = 0, frame_en = 0, enc_en;
  logic [31:0] test_pattern = '0, enc_d;
  logic [K_MAX-1:0] info = '0;
  rate_e rate = RATE_1_2;
  int checks = 0, failures = 0;

  encoder_controller dut (.test_active, .test_pattern, .frame_en, .info, .rate, .enc_en, .enc_d);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      bit r23;
      r23 = (i % 2) == 1;
      info = 21'($urandom);
      rate = r23 ? RATE_2_3 : RATE_1_2;
      frame_en = ($urandom % 2) == 1;
      test_active = (i % 7) == 3;
      test_pattern = $urandom;
      #1;
      checks++;
      if (test_active) begin
        if (enc_d !== test_pattern || !enc_en) begin failures++; $display("FAIL test mode"); end
      end else begin
        if (enc_d !== ref_place(info, r23) || enc_en !== frame_en) begin
          failures++;
          $display("FAIL placement r23=%0b info=%h d=%h exp=%h", r23, info, enc_d, ref_place(info, r23));
        end
        checks++;
        if ((enc_d & ref_frozen(r23)) != 0) begin failures++; $display("FAIL frozen bit set"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
