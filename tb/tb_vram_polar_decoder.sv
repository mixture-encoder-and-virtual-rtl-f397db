// tb_vram_polar_decoder: feeds stored frames (made by a reference encoder)
// into the receiver. Clean frames must take the early-termination bypass
// (3 clocks) and return the transmitted vector; noisy frames, or frames
// under an unreachable threshold, must go through SC decoding (66 clocks)
// and match a reference SC decoder. hash_ok is checked against hashes
// recomputed by the reference; both outcomes must occur.
module tb_vram_polar_decoder;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  localparam int Q = 6, AMP = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, hash_ok, early;
  vram_word_t in_word = '0;
  logic [1:0] in_vch = '0, out_vch;
  logic signed [Q-1:0] noise [N];
  logic [Q-1:0] et_thresh = '0;
  logic [N-1:0] d_correct;
  rate_e out_rate;
  int checks = 0, failures = 0;
  int n_early = 0, n_sc = 0, n_hash_bad = 0, n_corrected = 0;

  vram_polar_decoder #(.Q(Q), .W(8), .AMP(AMP)) dut (.clk, .rst_n, .in_valid, .in_ready,
    .in_word, .in_vch, .noise, .et_thresh, .out_valid, .d_correct, .hash_ok, .early,
    .out_rate, .out_vch);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run_frame(bit r23, int noise_amp, int thresh);
    logic [31:0] u, exp_u;
    ref_enc_t e, e2;
    int llr [32];
    int lat, flips;
    bit exp_early, exp_ok, synd_ok, rel;
    u = ref_place(21'($urandom), r23);
    e = ref_encode(u);
    flips = 0;
    rel = 1;
    for (int j = 0; j < N; j++) begin
      int nz, s;
      nz = (noise_amp > 0) ? int'($urandom % (2 * noise_amp + 1)) - noise_amp : 0;
      noise[j] = Q'(nz);
      s = (ref_polar(u)[j] ? -AMP : AMP) + nz;
      if (s > 31) s = 31;
      if (s < -31) s = -31;
      llr[j] = s;
      if ((s < 0) != ref_polar(u)[j]) flips++;
      if ((s < 0 ? -s : s) < thresh) rel = 0;
    end
    // expected path: bypass when hard decisions form a codeword with zero
    // frozen bits and every |LLR| reaches the threshold
    begin
      logic [31:0] y, uc;
      y = '0;
      for (int j = 0; j < N; j++) y[j] = llr[j] < 0;
      uc = ref_polar(y);
      synd_ok = (uc & ref_frozen(r23)) == 0;
      exp_early = synd_ok && rel;
      exp_u = exp_early ? uc : ref_sc(llr, ref_frozen(r23));
    end
    e2 = ref_encode(exp_u);
    exp_ok = e2.h == e.h && e2.v == e.v;
    et_thresh = Q'(thresh);
    in_word.rate = r23 ? RATE_2_3 : RATE_1_2;
    in_word.enc.dc = e.dc;
    in_word.enc.h1 = e.h[0];
    in_word.enc.h2 = e.h[1];
    in_word.enc.h3 = e.h[2];
    in_word.enc.h4 = e.h[3];
    in_word.enc.v = e.v;
    in_vch = 2'($urandom);
    check(in_ready, "ready when idle");
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    check(d_correct == exp_u, $sformatf("decoded %h expected %h", d_correct, exp_u));
    check(early == exp_early, "early termination decision");
    check(hash_ok == exp_ok, "hash check");
    check(out_rate == in_word.rate && out_vch == in_vch, "frame tags");
    check(lat == (exp_early ? 3 : 66), $sformatf("latency %0d", lat));
    if (early) n_early++; else n_sc++;
    if (!hash_ok) n_hash_bad++;
    if (!early && flips > 0 && d_correct == u) n_corrected++;
    @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < N; j++) noise[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) run_frame(i % 2, 0, 4);       // clean: bypass
    for (int i = 0; i < 10; i++) run_frame(i % 2, 0, 20);      // threshold not met
    for (int i = 0; i < 100; i++) run_frame(i % 2, 12, 2);     // noisy
    for (int i = 0; i < 40; i++) run_frame(i % 2, 25, 2);      // very noisy
    $display("early=%0d sc=%0d hash_bad=%0d corrected=%0d", n_early, n_sc, n_hash_bad, n_corrected);
    check(n_early > 0, "bypass happened");
    check(n_sc > 0, "SC decoding happened");
    check(n_hash_bad > 0, "hash mismatch happened");
    check(n_corrected > 0, "SC corrected channel errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
