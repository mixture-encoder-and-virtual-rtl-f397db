// polar_pkg: types, constants and pure functions shared by the transmit
// chain (self-test, mixture encoder) and the receive chain (virtual RAM,
// successive-cancellation decoder).
//
// What follows the source design: the code length N = 32, the local mixing
// function O = I0 ^ I1 ^ (I2 & I3) (the minimised form of the 4-input
// mixing unit), the encoder equation dc = M*d xor H with M taken as the
// polar generator matrix, the 5-bit hashes h1..h4 and 16-bit verification
// vector V, the 8-bit LFSR polynomial x^8+x^6+x^3+x^2+1, the 16-bit
// signature width and the 256-pattern self-test.
//
// This design's own choices: the information sets (the most reliable
// indices of the 5G NR polar reliability order restricted to N = 32), the
// hash bit selection, V as a 16-bit fold of the frame, the way the hashes
// are spread into H, the expansion of an LFSR byte to a 32-bit test word,
// the MISR polynomial (x^16+x^12+x^5+1) and the response folding.
package polar_pkg;

  localparam int N    = 32;           // code length
  localparam int LOGN = 5;

  // Rate modes of the encoder controller.
  typedef enum logic [0:0] {
    RATE_1_2 = 1'b0,                  // K = 16 information bits
    RATE_2_3 = 1'b1                   // K = 21 information bits
  } rate_e;

  localparam int K_R12 = 16;
  localparam int K_R23 = 21;
  localparam int K_MAX = K_R23;

  // One encoded frame as produced by the mixture encoder.
  typedef struct packed {
    logic [31:0] dc;
    logic [4:0]  h1;
    logic [4:0]  h2;
    logic [4:0]  h3;
    logic [4:0]  h4;
    logic [15:0] v;
  } enc_word_t;

  // What one virtual-RAM word holds: the encoded frame plus its rate mode.
  typedef struct packed {
    rate_e     rate;
    enc_word_t enc;
  } vram_word_t;

  localparam int VRAM_W = $bits(vram_word_t);   // 69 bits

  // 5G NR polar reliability order, indices below 32, least reliable first.
  localparam logic [4:0] REL_SEQ [32] = '{
    5'd0,  5'd1,  5'd2,  5'd4,  5'd8,  5'd16, 5'd3,  5'd5,
    5'd9,  5'd6,  5'd17, 5'd10, 5'd18, 5'd12, 5'd20, 5'd24,
    5'd7,  5'd11, 5'd19, 5'd13, 5'd14, 5'd21, 5'd26, 5'd25,
    5'd22, 5'd28, 5'd15, 5'd23, 5'd27, 5'd29, 5'd30, 5'd31};

  // Information-set mask: bit j set when u[j] carries data for K bits.
  function automatic logic [N-1:0] info_mask_k(int k);
    logic [N-1:0] m;
    m = '0;
    for (int j = N - k; j < N; j++) m[REL_SEQ[j]] = 1'b1;
    return m;
  endfunction

  localparam logic [N-1:0] INFO_MASK_R12 = info_mask_k(K_R12);
  localparam logic [N-1:0] INFO_MASK_R23 = info_mask_k(K_R23);

  function automatic logic [N-1:0] info_mask(rate_e r);
    return (r == RATE_2_3) ? INFO_MASK_R23 : INFO_MASK_R12;
  endfunction

  // Local mixing unit, Karnaugh-minimised: O = I0 ^ I1 ^ (I2 & I3).
  function automatic logic mix4(logic i0, logic i1, logic i2, logic i3);
    return i0 ^ i1 ^ (i2 & i3);
  endfunction

  // Polar transform x = u * F^(x)5 with F = [1 0; 1 1], natural order:
  // x[j] = XOR of u[i] over all i whose bits include those of j.
  // Five butterfly stages of XORs; the transform is its own inverse.
  function automatic logic [N-1:0] polar_transform(logic [N-1:0] u);
    logic [N-1:0] x;
    x = u;
    for (int s = 0; s < LOGN; s++)
      for (int k = 0; k < N; k++)
        if (((k >> s) & 1) == 0) x[k] = x[k] ^ x[k + (1 << s)];
    return x;
  endfunction

  // 5-bit hash of one byte lane: bit 0 is the lane parity, bits 1..4 are
  // mixing units over differently paired bits of the lane.
  function automatic logic [4:0] hash8(logic [7:0] s);
    logic [4:0] h;
    h[0] = ^s;
    h[1] = mix4(s[0], s[3], s[1], s[2]);
    h[2] = mix4(s[0], s[2], s[4], s[5]);
    h[3] = mix4(s[3], s[6], s[5], s[7]);
    h[4] = mix4(s[6], s[7], s[1], s[4]);
    return h;
  endfunction

  // Verification vector: the two frame halves folded together.
  function automatic logic [15:0] fold16(logic [31:0] d);
    return d[31:16] ^ d[15:0];
  endfunction

  // H of dc = M*d xor H: hash k occupies the low five bits of byte lane k-1.
  function automatic logic [31:0] expand_h(logic [4:0] h1, logic [4:0] h2,
                                           logic [4:0] h3, logic [4:0] h4);
    return {3'b000, h4, 3'b000, h3, 3'b000, h2, 3'b000, h1};
  endfunction

  // Complete combinational encoding of one 32-bit vector.
  function automatic enc_word_t encode(logic [31:0] d);
    enc_word_t w;
    w.h1 = hash8(d[7:0]);
    w.h2 = hash8(d[15:8]);
    w.h3 = hash8(d[23:16]);
    w.h4 = hash8(d[31:24]);
    w.v  = fold16(d);
    w.dc = polar_transform(d) ^ expand_h(w.h1, w.h2, w.h3, w.h4);
    return w;
  endfunction

  // ---------------- built-in self-test ----------------
  localparam int          BIST_PATTERNS = 256;
  localparam logic [7:0]  LFSR_SEED     = 8'h01;
  localparam logic [15:0] MISR_SEED     = 16'h0000;
  localparam logic [15:0] MISR_POLY     = 16'h1021;   // x^16+x^12+x^5+1

  // Fibonacci LFSR for x^8 + x^6 + x^3 + x^2 + 1: taps at stages 8,6,3,2.
  function automatic logic [7:0] lfsr_next(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[2] ^ s[1]};
  endfunction

  function automatic logic [7:0] bitrev8(logic [7:0] p);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = p[7 - i];
    return r;
  endfunction

  // 32-bit test word built from one LFSR state p and the pattern index i.
  // The index adds variety that a function of the 8-bit state alone cannot
  // give, so that every encoder pin toggles during the test.
  function automatic logic [31:0] bist_expand(logic [7:0] p, logic [7:0] i);
    return {p, bitrev8(p), p ^ i, bitrev8(p) ^ {i[3:0], i[7:4]}};
  endfunction

  // Fold of the whole encoder response (68 bits, as packed in enc_word_t)
  // into 16 bits: XOR of its 16-bit slices.
  function automatic logic [15:0] response_fold(enc_word_t w);
    logic [79:0] x;
    x = 80'(w);
    return x[15:0] ^ x[31:16] ^ x[47:32] ^ x[63:48] ^ x[79:64];
  endfunction

  // MISR: shift left with feedback through MISR_POLY, then add the input.
  function automatic logic [15:0] misr_next(logic [15:0] s, logic [15:0] in);
    return ({s[14:0], 1'b0} ^ (s[15] ? MISR_POLY : 16'h0000)) ^ in;
  endfunction

  // Reference signature of a fault-free encoder for the full pattern set.
  function automatic logic [15:0] bist_golden();
    logic [7:0]  p;
    logic [15:0] sig;
    p   = LFSR_SEED;
    sig = MISR_SEED;
    for (int i = 0; i < BIST_PATTERNS; i++) begin
      sig = misr_next(sig, response_fold(encode(bist_expand(p, 8'(i)))));
      p   = lfsr_next(p);
    end
    return sig;
  endfunction

  localparam logic [15:0] BIST_GOLDEN = bist_golden();

endpackage
