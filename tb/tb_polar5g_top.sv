// tb_polar5g_top: end-to-end test of the whole chain at its default size.
// Frames of both rates are sent on all four virtual channels through the
// self-test gate, encoder, virtual RAM, decoder and output assembler.
// For every frame the decoder takes, the testbench records the noise it
// was given, matches the stored word against the frames it sent on that
// channel (words skipped there were dropped on overflow) and predicts the
// output with reference models. Phases: self-test after reset, clean
// traffic (early-termination bypass), a re-test requested mid-run (frames
// refused), bad-parity frames, a burst that overflows one channel region,
// noisy traffic (SC decoding and error correction), and very noisy
// traffic (hash mismatches). Every mechanism must occur at least once.
module tb_polar5g_top;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  localparam int Q = 6, AMP = 8;
  logic clk = 0, rst_n = 0, bist_start = 0;
  logic in_valid = 0, in_ready, in_parity = 0;
  logic [K_MAX-1:0] in_info = '0, out_info;
  rate_e in_rate = RATE_1_2, out_rate;
  logic [1:0] in_vch = '0, out_vch;
  logic signed [Q-1:0] noise [N];
  logic [Q-1:0] et_thresh = 6'd2;
  logic out_valid, out_hash_ok, out_early, bist_done, hw_ok, bist_fail;
  logic [15:0] bist_signature, parity_err_cnt, overflow_cnt;
  int checks = 0, failures = 0;

  polar5g_top dut (.clk, .rst_n, .bist_start, .in_valid, .in_ready, .in_info,
    .in_rate, .in_vch, .in_parity, .noise, .et_thresh, .out_valid, .out_info,
    .out_rate, .out_vch, .out_hash_ok, .out_early, .bist_done, .hw_ok,
    .bist_fail, .bist_signature, .parity_err_cnt, .overflow_cnt);

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

  // ---- bookkeeping ----
  typedef struct { logic [20:0] info; bit r23; } sent_t;
  sent_t sent [4][$];
  typedef struct {
    logic [20:0] info; bit r23; int vch; bit early; bit hash_ok; bit correct;
  } exp_t;
  exp_t expq [$];
  int n_bist_pass = 0, n_retest = 0, n_refused = 0, n_parity = 0, n_r12 = 0, n_r23 = 0;
  int n_drop = 0, n_early = 0, n_sc = 0, n_corrected = 0, n_hash_bad = 0;
  int n_outputs = 0, n_ok_frames = 0;
  int vch_seen [4] = '{0, 0, 0, 0};

  // Snoop the frame the decoder accepts and predict its output.
  always @(posedge clk) if (rst_n && dut.dec_valid && dut.dec_ready) begin
    int ch, skipped, llr [32];
    bit found, rel, synd, e_early;
    logic [31:0] u, y, uc, res;
    ref_enc_t e, e2;
    exp_t x;
    ch = int'(dut.dec_vch);
    found = 0;
    skipped = 0;
    while (!found && sent[ch].size() > 0) begin
      sent_t s;
      s = sent[ch].pop_front();
      u = ref_place(s.info, s.r23);
      e = ref_encode(u);
      if (e.dc == dut.dec_word.enc.dc && e.v == dut.dec_word.enc.v &&
          dut.dec_word.rate == (s.r23 ? RATE_2_3 : RATE_1_2)) begin
        found = 1;
        x.info = s.info;
        x.r23 = s.r23;
      end else skipped++;
    end
    checks++;
    if (!found) begin failures++; $display("FAIL stored word matches no sent frame"); end
    n_drop += skipped;
    rel = 1;
    y = '0;
    for (int j = 0; j < N; j++) begin
      int s;
      s = (ref_polar(u)[j] ? -AMP : AMP) + int'(noise[j]);
      if (s > 31) s = 31;
      if (s < -31) s = -31;
      llr[j] = s;
      y[j] = s < 0;
      if ((s < 0 ? -s : s) < int'(et_thresh)) rel = 0;
    end
    uc = ref_polar(y);
    synd = (uc & ref_frozen(x.r23)) == 0;
    e_early = synd && rel;
    res = e_early ? uc : ref_sc(llr, ref_frozen(x.r23));
    e2 = ref_encode(res);
    x.vch = ch;
    x.early = e_early;
    x.hash_ok = (e2.h == e.h) && (e2.v == e.v);
    x.correct = (res == u);
    if (!e_early && res == u && (y != ref_polar(u))) n_corrected++;
    expq.push_back(x);
  end

  // Check every output against the prediction.
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t x;
    #1;
    n_outputs++;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL output with nothing expected");
    end else begin
      x = expq.pop_front();
      if (x.correct) begin
        checks++;
        if (out_info != x.info) begin failures++; $display("FAIL info %h expected %h", out_info, x.info); end
        else n_ok_frames++;
      end
      if (out_early !== x.early || out_hash_ok !== x.hash_ok ||
          int'(out_vch) != x.vch || out_rate != (x.r23 ? RATE_2_3 : RATE_1_2)) begin
        failures++;
        $display("FAIL status early=%0b/%0b hash_ok=%0b/%0b", out_early, x.early, out_hash_ok, x.hash_ok);
      end
      if (out_early) n_early++; else n_sc++;
      if (!out_hash_ok) n_hash_bad++;
      vch_seen[int'(out_vch)]++;
    end
  end

  int noise_amp = 0;
  always @(negedge clk)
    for (int j = 0; j < N; j++)
      noise[j] = (noise_amp > 0) ? Q'(int'($urandom % (2 * noise_amp + 1)) - noise_amp) : '0;

  // Offer one frame; returns 1 when it was taken.
  task automatic send(int ch, bit r23, bit bad_parity, output bit taken);
    logic [20:0] info;
    info = r23 ? 21'($urandom) : 21'($urandom & 32'hFFFF);
    @(negedge clk);
    in_valid = 1;
    in_info = info;
    in_rate = r23 ? RATE_2_3 : RATE_1_2;
    in_vch = 2'(ch);
    in_parity = (^info) ^ bad_parity;
    taken = in_ready;
    if (taken && !bad_parity) begin
      sent_t s;
      s.info = info;
      s.r23 = r23;
      sent[ch].push_back(s);
      if (r23) n_r23++; else n_r12++;
    end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic drain();
    int idle;
    idle = 0;
    while (idle < 200) begin
      @(posedge clk);
      if (expq.size() == 0 && !dut.dec_valid && dut.dec_ready &&
          dut.u_dma.vch_empty == '1) idle++;
      else idle = 0;
    end
  endtask

  initial begin
    bit taken;
    int lat, parity_before;
    for (int j = 0; j < N; j++) noise[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(!in_ready, "frames refused during power-on self-test");
    wait (bist_done);
    @(negedge clk);
    check(hw_ok && !bist_fail, "power-on self-test passes");
    if (hw_ok) n_bist_pass++;

    // latency of one frame through an idle chain (early-terminated)
    send(0, 0, 0, taken);
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    $display("idle-chain latency of a clean frame: %0d clocks", lat);
    check(lat == 10, "idle-chain latency: output 8 clocks after the accepting edge");
    drain();

    // clean traffic on all channels, both rates
    for (int i = 0; i < 60; i++) begin
      send(i % 4, (i / 4) % 2, 0, taken);
      repeat ($urandom % 3) @(negedge clk);
    end
    drain();

    // re-test requested mid-run: frames are refused while it runs
    @(negedge clk);
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    n_retest++;
    for (int i = 0; i < 20; i++) begin
      send(1, 1, 0, taken);
      if (!taken) n_refused++;
    end
    wait (bist_done);
    @(negedge clk);
    check(hw_ok, "re-test passes");
    if (hw_ok) n_bist_pass++;

    // bad parity frames are dropped
    parity_before = int'(parity_err_cnt);
    for (int i = 0; i < 5; i++) send(2, 0, 1, taken);
    @(negedge clk);
    n_parity = int'(parity_err_cnt) - parity_before;
    check(n_parity == 5, "five parity errors counted");
    drain();

    // a noisy burst into one channel overflows its 128-word region: the
    // decoder needs 66 clocks per SC-decoded frame, the sender offers one
    // frame per clock
    noise_amp = 10;
    for (int i = 0; i < 170; i++) send(2, i % 2, 0, taken);
    drain();

    // noisy traffic: SC decoding
    noise_amp = 10;
    for (int i = 0; i < 120; i++) send(i % 4, i % 2, 0, taken);
    drain();
    // very noisy traffic: decoding failures show as hash mismatches
    noise_amp = 28;
    for (int i = 0; i < 40; i++) send(i % 4, i % 2, 0, taken);
    drain();
    noise_amp = 0;

    $display("outputs=%0d correct=%0d bist_pass=%0d retest=%0d refused=%0d parity=%0d r12=%0d r23=%0d",
             n_outputs, n_ok_frames, n_bist_pass, n_retest, n_refused, n_parity, n_r12, n_r23);
    $display("overflow drops=%0d early=%0d sc=%0d corrected=%0d hash_bad=%0d vch=%0d/%0d/%0d/%0d",
             n_drop, n_early, n_sc, n_corrected, n_hash_bad,
             vch_seen[0], vch_seen[1], vch_seen[2], vch_seen[3]);
    check(n_bist_pass == 2, "self-test passed twice");
    check(n_refused > 0, "frames refused during re-test");
    check(n_parity > 0, "parity drop happened");
    check(n_r12 > 0 && n_r23 > 0, "both rate modes used");
    check(n_drop > 0, "overflow happened");
    check(n_early > 0, "early termination happened");
    check(n_sc > 0, "SC decoding happened");
    check(n_corrected > 0, "SC corrected channel errors");
    check(n_hash_bad > 0, "hash mismatch flagged");
    check(vch_seen[0] > 0 && vch_seen[1] > 0 && vch_seen[2] > 0 && vch_seen[3] > 0,
          "all virtual channels used");
    check(expq.size() == 0, "every accepted frame came out");
    // drops show as skipped frames once a later frame of that channel is
    // matched; every channel carried traffic after the burst

    check(int'(overflow_cnt) == n_drop, $sformatf("dropped frames (%0d) equal the overflow count (%0d)", n_drop, overflow_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
