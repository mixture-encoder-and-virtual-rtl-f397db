// tb_bist_coverage: stuck-at fault coverage of the built-in self-test at
// the pins of the circuit under test.
//
// The self-test controller runs against a real mixture encoder. One
// single stuck-at fault at a time is placed on one pin of the encoder, and
// the full test (256 patterns, 258 clocks) is run. A fault counts as
// detected when the test ends in the fail state. The faults are placed in
// the wiring between the two blocks, so the encoder itself is unchanged.
//
// Fault list: every input and output pin, stuck at 0 and stuck at 1.
//   - the 32 data inputs d;
//   - the 68 outputs (dc, h1..h4, V).
// That is 100 pins, or 200 faults. Faults on internal nets of the encoder
// are not modelled.
//
// A fault-free test must pass before and after the sweep. The coverage,
// and any undetected faults, are printed. The source design reports 94.7 %
// coverage for its own encoder netlist. Here the check is that the pin
// coverage reaches at least that figure.
module tb_bist_coverage;
  import polar_pkg::*;
  localparam int NETS = 32 + $bits(enc_word_t);
  logic clk = 0, rst_n = 0, bist_start = 0;
  logic in_valid = 0, in_ready, in_parity = 0;
  logic [K_MAX-1:0] in_info = '0, out_info;
  rate_e in_rate = RATE_1_2, out_rate;
  logic [1:0] in_vch = '0, out_vch;
  logic out_en, test_active, enc_valid;
  logic [31:0] test_pattern;
  enc_word_t enc_word, enc_raw;
  logic [31:0] enc_d;
  logic bist_done, hw_ok, bist_fail;
  logic [15:0] signature, parity_err_cnt;
  int checks = 0, failures = 0;
  int fid = -1;          // pin under fault, -1 for none
  logic sa = 1'b0;       // stuck-at value

  bist_module dut (.clk, .rst_n, .bist_start, .in_valid, .in_ready, .in_info,
    .in_rate, .in_vch, .in_parity, .out_en, .out_info, .out_rate, .out_vch,
    .test_active, .test_pattern, .enc_valid, .enc_word, .bist_done, .hw_ok,
    .bist_fail, .signature, .parity_err_cnt);

  mixture_encoder cut (.clk, .rst_n, .en(test_active || out_en),
    .d(enc_d), .dc(enc_raw.dc), .h1(enc_raw.h1),
    .h2(enc_raw.h2), .h3(enc_raw.h3), .h4(enc_raw.h4), .v(enc_raw.v),
    .valid(enc_valid));

  // ---- fault injection on the pins, faults 0..31 inputs, 32..99 outputs ----
  always_comb begin
    enc_d = test_active ? test_pattern : 32'h0;
    if (fid >= 0 && fid < 32) enc_d[fid] = sa;
    enc_word = enc_raw;
    if (fid >= 32 && fid < NETS) enc_word[fid - 32] = sa;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run_test(output bit failed, output int cycles);
    @(negedge clk);
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    cycles = 1;
    while (!bist_done) begin @(negedge clk); cycles++; end
    failed = bist_fail;
  endtask

  initial begin
    bit failed;
    int cyc, detected, total;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (!bist_done) @(negedge clk);
    check(hw_ok, "fault-free power-on test passes");
    detected = 0;
    total = 0;
    for (int f = 0; f < NETS; f++) begin
      for (int v = 0; v < 2; v++) begin
        sa = v[0];
        fid = f;
        run_test(failed, cyc);
        total++;
        if (failed) detected++;
        else $display("undetected: pin %0d stuck-at-%0d", f, v);
        checks++;
        if (cyc != 259) begin failures++; $display("FAIL test length %0d", cyc); end
      end
    end
    fid = -1;
    run_test(failed, cyc);
    check(!failed && hw_ok, "fault-free re-test passes after the sweep");
    $display("stuck-at faults: %0d, detected: %0d, coverage %0.1f %%", total, detected,
             100.0 * real'(detected) / real'(total));
    check(total == 2 * NETS, "every fault applied");
    check(real'(detected) >= 0.947 * real'(total), "pin coverage at least 94.7 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
