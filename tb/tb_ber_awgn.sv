// tb_ber_awgn: bit-error-rate sweep of the whole chain over an additive
// white Gaussian noise channel, at default parameters.
//
// Frames go one at a time through polar5g_top: self-test gate, encoder,
// virtual RAM, decoder and output assembler. Gaussian noise is injected on
// the decoder's noise[] inputs. It is held for the whole frame, so the
// channel LLR of bit j is +-AMP + noise[j]. The noise is a sum of twelve
// uniform variables (close to a unit normal) scaled to
//   sigma = AMP / sqrt(2 * R * Eb/N0),
// i.e. AMP plays the role of the BPSK amplitude, rounded and clipped to
// the 6-bit noise input.
//
// The sweep covers Eb/N0 = 1.4 to 3.4 dB in 0.5 dB steps at rates 1/2 and
// 2/3. Each point sends FRAMES frames (1600 or 2100 information bits).
// The early-termination threshold is 2, low enough that the bypass still
// fires on some frames at these noise levels.
//
// Every frame is checked exactly against the reference models:
//  - the early-termination decision;
//  - the SC result (an independent recursive decoder with the same
//    saturation);
//  - the recovered information bits, right or wrong;
//  - the hash flag;
//  - the latency: 8 clocks after the accepting edge on the early path,
//    63 more on the SC path.
//
// It then prints the bit and frame error rates of each point next to the
// raw (uncoded hard-decision) channel error rate. Two sanity checks follow,
// for each rate:
//  - the decoded bit error rate at 3.4 dB is below that at 1.4 dB;
//  - at 3.4 dB the decoded error rate is below the raw channel error rate.
module tb_ber_awgn;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  localparam int Q = 6, AMP = 8, FRAMES = 100, POINTS = 5;
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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Approximately unit-normal sample: sum of 12 uniforms on [0,1) minus 6.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  int bit_err, frame_err, raw_err, n_early, n_sc;

  task automatic run_frame(bit r23, real sigma);
    logic [20:0] info, exp_info;
    logic [31:0] u, x, y, uc, res;
    int llr [32], lat, k;
    bit rel, e_early, e_ok;
    ref_enc_t e, e2;
    k = r23 ? K_R23 : K_R12;
    info = r23 ? 21'($urandom) : 21'($urandom & 32'hFFFF);
    u = ref_place(info, r23);
    x = ref_polar(u);
    rel = 1;
    y = '0;
    for (int j = 0; j < N; j++) begin
      int nz, s;
      real g;
      g = sigma * gauss();
      nz = (g >= 0.0) ? $rtoi(g + 0.5) : -$rtoi(0.5 - g);
      if (nz > 31) nz = 31;
      if (nz < -32) nz = -32;
      noise[j] = Q'(nz);
      s = (x[j] ? -AMP : AMP) + nz;
      if (s > 31) s = 31;
      if (s < -31) s = -31;
      llr[j] = s;
      y[j] = s < 0;
      if ((s < 0 ? -s : s) < int'(et_thresh)) rel = 0;
    end
    raw_err += $countones(y ^ x);
    uc = ref_polar(y);
    e_early = ((uc & ref_frozen(r23)) == 0) && rel;
    res = e_early ? uc : ref_sc(llr, ref_frozen(r23));
    exp_info = ref_extract(res, r23);
    e = ref_encode(u);
    e2 = ref_encode(res);
    e_ok = (e2.h == e.h) && (e2.v == e.v);
    // offer the frame
    @(negedge clk);
    in_valid = 1;
    in_info = info;
    in_rate = r23 ? RATE_2_3 : RATE_1_2;
    in_vch = 2'($urandom);
    in_parity = ^info;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    check(out_early == e_early, "early-termination decision");
    check(out_info == exp_info, $sformatf("info %h expected %h", out_info, exp_info));
    check(out_hash_ok == e_ok, "hash flag");
    check(out_rate == in_rate, "rate tag");
    check(lat == (e_early ? 9 : 72), $sformatf("latency %0d", lat));
    if (e_early) n_early++; else n_sc++;
    bit_err += $countones((out_info ^ info) & ((21'd1 << k) - 1));
    if (((out_info ^ info) & ((21'd1 << k) - 1)) != 0) frame_err++;
  endtask

  real ber_lo [2], ber_hi [2], raw_hi [2];

  initial begin
    for (int j = 0; j < N; j++) noise[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (bist_done);
    @(negedge clk);
    check(hw_ok, "self-test passes");
    $display("rate  Eb/N0(dB)  sigma  frames  info_bits  bit_err  BER      FER     raw_BER");
    for (int r = 0; r < 2; r++) begin
      for (int p = 0; p < POINTS; p++) begin
        real ebn0_db, rate, sigma, ber, fer, raw;
        int k;
        ebn0_db = 1.4 + 0.5 * p;
        rate = (r != 0) ? real'(K_R23) / 32.0 : real'(K_R12) / 32.0;
        k = (r != 0) ? K_R23 : K_R12;
        sigma = real'(AMP) / $sqrt(2.0 * rate * (10.0 ** (ebn0_db / 10.0)));
        bit_err = 0; frame_err = 0; raw_err = 0;
        for (int f = 0; f < FRAMES; f++) run_frame(r[0], sigma);
        ber = real'(bit_err) / real'(FRAMES * k);
        fer = real'(frame_err) / real'(FRAMES);
        raw = real'(raw_err) / real'(FRAMES * N);
        $display("%s   %4.1f      %5.2f  %0d     %0d       %0d      %7.5f  %6.3f  %7.5f",
                 (r != 0) ? "2/3" : "1/2", ebn0_db, sigma, FRAMES, FRAMES * k, bit_err, ber, fer, raw);
        if (p == 0) ber_lo[r] = ber;
        if (p == POINTS - 1) begin ber_hi[r] = ber; raw_hi[r] = raw; end
      end
      check(ber_hi[r] < ber_lo[r], $sformatf("rate %0d: BER falls with SNR", r));
      check(ber_hi[r] < raw_hi[r], $sformatf("rate %0d: decoding beats the raw channel", r));
    end
    $display("early=%0d sc=%0d", n_early, n_sc);
    check(n_early > 0 && n_sc > 0, "both decoder paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
