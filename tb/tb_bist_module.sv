// tb_bist_module: runs the self-test against a real mixture encoder as the
// circuit under test. Checks the pattern count and test duration, the
// signature against an independently computed reference, frame gating
// while testing, parity drops, and that an injected stuck-at fault in the
// encoder response makes the test fail and blocks frames until a clean
// re-test passes.
module tb_bist_module;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, bist_start = 0;
  logic in_valid = 0, in_ready, in_parity = 0;
  logic [K_MAX-1:0] in_info = '0, out_info;
  rate_e in_rate = RATE_1_2, out_rate;
  logic [1:0] in_vch = '0, out_vch;
  logic out_en, test_active, enc_valid;
  logic [31:0] test_pattern;
  enc_word_t enc_word, enc_raw;
  logic bist_done, hw_ok, bist_fail;
  logic [15:0] signature, parity_err_cnt;
  logic inject = 0;
  int checks = 0, failures = 0;
  int active_cycles = 0;

  bist_module dut (.clk, .rst_n, .bist_start, .in_valid, .in_ready, .in_info,
    .in_rate, .in_vch, .in_parity, .out_en, .out_info, .out_rate, .out_vch,
    .test_active, .test_pattern, .enc_valid, .enc_word, .bist_done, .hw_ok,
    .bist_fail, .signature, .parity_err_cnt);

  mixture_encoder cut (.clk, .rst_n, .en(test_active || out_en),
    .d(test_active ? test_pattern : 32'h0), .dc(enc_raw.dc), .h1(enc_raw.h1),
    .h2(enc_raw.h2), .h3(enc_raw.h3), .h4(enc_raw.h4), .v(enc_raw.v),
    .valid(enc_valid));

  // Stuck-at-1 fault on dc bit 3 when inject is set.
  always_comb begin
    enc_word = enc_raw;
    if (inject) enc_word.dc[3] = 1'b1;
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && test_active) active_cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_done(output int cycles);
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!bist_done);
    @(negedge clk);
  endtask

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int cyc;
    logic [15:0] golden;
    golden = ref_golden();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(in_ready == 0, "frames refused during test");
    wait_done(cyc);
    $display("self-test took %0d clocks, %0d patterns, signature %h", cyc, active_cycles, signature);
    check(active_cycles == 256, "256 patterns applied");
    check(cyc == 258, "test duration 258 clocks");
    check(signature == golden, "signature equals reference");
    check(hw_ok && !bist_fail && in_ready, "pass state");

    // good frame
    in_valid = 1; in_info = 21'h15A5A5; in_rate = RATE_2_3; in_vch = 2'd2;
    in_parity = ^in_info;
    @(negedge clk);
    in_valid = 0;
    check(out_en && out_info == 21'h15A5A5 && out_rate == RATE_2_3 && out_vch == 2'd2,
          "frame forwarded with enable");
    // bad parity frame
    in_valid = 1; in_info = 21'h000003; in_parity = 1'b1;
    @(negedge clk);
    in_valid = 0;
    check(!out_en && parity_err_cnt == 16'd1, "parity error dropped and counted");
    @(negedge clk);

    // fault injection
    inject = 1;
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    active_cycles = 0;
    wait_done(cyc);
    check(bist_fail && !hw_ok && !in_ready, "stuck-at fault detected");
    check(signature != golden, "faulty signature differs");
    in_valid = 1; in_info = 21'h1; in_parity = 1'b1;
    @(negedge clk);
    in_valid = 0;
    check(!out_en, "frames blocked after failure");

    // clean re-test
    inject = 0;
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    wait_done(cyc);
    check(hw_ok && signature == golden, "re-test passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
