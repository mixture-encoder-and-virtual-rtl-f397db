// tb_ref_pkg: reference models used by the testbenches to work out the
// expected values independently of the RTL. They are written from the
// definitions (truth table, generator-matrix entries, explicit index
// lists, a root-to-leaf SC recomputation) rather than from the RTL's
// structure.
package tb_ref_pkg;

  // Truth table of the 4-input mixing unit, indexed by {I3,I2,I1,I0}.
  localparam logic [15:0] MIX_TT = 16'b1001_0110_0110_0110;

  function automatic logic ref_mix(logic i0, logic i1, logic i2, logic i3);
    return MIX_TT[{i3, i2, i1, i0}];
  endfunction

  // Six-term sum of products of the mixing unit.
  function automatic logic ref_mix_sop(logic i0, logic i1, logic i2, logic i3);
    return (!i0 & i1 & !i3) | (i0 & !i1 & !i2) | (!i0 & i1 & !i2) |
           (!i0 & !i1 & i2 & i3) | (i0 & i1 & i2 & i3) | (i0 & !i1 & !i3);
  endfunction

  // x = u * G32, G32[i][j] = 1 when the bits of j are a subset of those of i.
  function automatic logic [31:0] ref_polar(logic [31:0] u);
    logic [31:0] x;
    x = '0;
    for (int j = 0; j < 32; j++)
      for (int i = 0; i < 32; i++)
        if ((i & j) == j) x[j] ^= u[i];
    return x;
  endfunction

  function automatic logic [4:0] ref_hash8(logic [7:0] s);
    logic [4:0] h;
    h[0] = s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4] ^ s[5] ^ s[6] ^ s[7];
    h[1] = ref_mix(s[0], s[3], s[1], s[2]);
    h[2] = ref_mix(s[0], s[2], s[4], s[5]);
    h[3] = ref_mix(s[3], s[6], s[5], s[7]);
    h[4] = ref_mix(s[6], s[7], s[1], s[4]);
    return h;
  endfunction

  typedef struct {
    logic [31:0] dc;
    logic [4:0]  h [4];
    logic [15:0] v;
  } ref_enc_t;

  function automatic ref_enc_t ref_encode(logic [31:0] d);
    ref_enc_t r;
    logic [31:0] hv;
    hv = '0;
    for (int k = 0; k < 4; k++) begin
      r.h[k] = ref_hash8(d[8*k +: 8]);
      for (int b = 0; b < 5; b++) hv[8*k + b] = r.h[k][b];
    end
    r.v  = d[15:0] ^ d[31:16];
    r.dc = ref_polar(d) ^ hv;
    return r;
  endfunction

  // Information positions, ascending.
  localparam int INFO12 [16] = '{7, 11, 13, 14, 15, 19, 21, 22, 23, 25, 26, 27, 28, 29, 30, 31};
  localparam int INFO23 [21] = '{7, 10, 11, 12, 13, 14, 15, 18, 19, 20, 21, 22, 23, 24, 25,
                                 26, 27, 28, 29, 30, 31};

  function automatic logic [31:0] ref_place(logic [20:0] info, bit r23);
    logic [31:0] u;
    u = '0;
    if (r23) for (int k = 0; k < 21; k++) u[INFO23[k]] = info[k];
    else     for (int k = 0; k < 16; k++) u[INFO12[k]] = info[k];
    return u;
  endfunction

  function automatic logic [20:0] ref_extract(logic [31:0] u, bit r23);
    logic [20:0] info;
    info = '0;
    if (r23) for (int k = 0; k < 21; k++) info[k] = u[INFO23[k]];
    else     for (int k = 0; k < 16; k++) info[k] = u[INFO12[k]];
    return info;
  endfunction

  function automatic logic [31:0] ref_frozen(bit r23);
    return ~ref_place(21'h1FFFFF, r23);
  endfunction

  // LFSR x^8+x^6+x^3+x^2+1, MISR x^16+x^12+x^5+1.
  function automatic logic [7:0] ref_lfsr(logic [7:0] s);
    logic fb;
    fb = s[7] ^ s[5] ^ s[2] ^ s[1];
    return (s << 1) | 8'(fb);
  endfunction

  function automatic logic [15:0] ref_misr(logic [15:0] s, logic [15:0] d);
    logic [15:0] n;
    n = s << 1;
    if (s[15]) begin
      n[0]  = ~n[0];
      n[5]  = ~n[5];
      n[12] = ~n[12];
    end
    return n ^ d;
  endfunction

  function automatic logic [31:0] ref_bist_word(logic [7:0] p, logic [7:0] i);
    logic [7:0] r;
    for (int k = 0; k < 8; k++) r[k] = p[7 - k];
    return {p, r, p ^ i, r ^ {i[3:0], i[7:4]}};
  endfunction

  // The 68 response bits in the order dc, h1, h2, h3, h4, V (MSB first),
  // zero-extended to 80 bits and cut into five 16-bit slices.
  function automatic logic [15:0] ref_fold(ref_enc_t e);
    logic [79:0] x;
    x = {12'h000, e.dc, e.h[0], e.h[1], e.h[2], e.h[3], e.v};
    return x[15:0] ^ x[31:16] ^ x[47:32] ^ x[63:48] ^ x[79:64];
  endfunction

  function automatic logic [15:0] ref_golden();
    logic [7:0]  p;
    logic [15:0] s;
    p = 8'h01;
    s = 16'h0000;
    for (int i = 0; i < 256; i++) begin
      s = ref_misr(s, ref_fold(ref_encode(ref_bist_word(p, 8'(i)))));
      p = ref_lfsr(p);
    end
    return s;
  endfunction

  // SC decoding recomputed from the root for every leaf; 8-bit saturating
  // LLRs, min-sum f, g = b +/- a.
  function automatic int sat8(int x);
    if (x > 127)  return 127;
    if (x < -127) return -127;
    return x;
  endfunction

  function automatic logic [31:0] ref_sc(int llr [32], logic [31:0] frozen);
    logic [31:0] u;
    int cur [32];
    int nxt [32];
    u = '0;
    for (int i = 0; i < 32; i++) begin
      for (int k = 0; k < 32; k++) cur[k] = llr[k];
      for (int l = 4; l >= 0; l--) begin
        int half, p;
        logic [31:0] blk, beta;
        half = 1 << l;
        p    = i >> l;
        blk  = '0;
        if (p % 2 == 1)
          for (int k = 0; k < half; k++) blk[k] = u[(p - 1) * half + k];
        beta = ref_polar(blk);   // the lower 'half' bits are the sub-transform
        for (int k = 0; k < half; k++) begin
          int a, b;
          a = cur[k];
          b = cur[k + half];
          if (p % 2 == 0) begin
            int ma, mb;
            ma = a < 0 ? -a : a;
            mb = b < 0 ? -b : b;
            nxt[k] = (ma < mb ? ma : mb) * (((a < 0) != (b < 0)) ? -1 : 1);
          end else begin
            nxt[k] = sat8(beta[k] ? b - a : b + a);
          end
        end
        for (int k = 0; k < 32; k++) cur[k] = (k < half) ? nxt[k] : 0;
      end
      u[i] = frozen[i] ? 1'b0 : (cur[0] < 0);
    end
    return u;
  endfunction

endpackage
