// sc_decoder: successive-cancellation polar decoder (min-sum), N = 32.
//
// Decodes u_hat[0..N-1] one bit at a time, in order, by walking the binary
// code tree (2N-1 nodes). One node is computed per clock by a row of N/2
// processing units, each of which can do either node update:
//   f(a,b) = sgn(a) sgn(b) min(|a|,|b|)      (left child)
//   g(a,b) = b + (1 - 2*beta) a               (right child)
// where a and b are the first and second halves of the parent's LLRs and
// beta is the partial sum (the polar transform of the already decided bits
// of the left sibling). At a leaf, the bit is 0 when frozen, otherwise 0
// when its LLR is >= 0 and 1 when it is negative. Schedule: leaf i > 0
// needs one g at level ctz(i) and then f down to level 0; leaf 0 needs f
// at every level. This gives 2N-2 = 62 compute cycles per codeword.
// Follows the source design: SC decision rule, min-sum f, g update,
// sequential tree traversal. This design's choices: LLR widths (Q-bit
// input, W-bit saturating internal), one tree level per clock, the
// partial sums recomputed from u_hat instead of stored.
// Interface: pulse start with llr_in and frozen valid (sampled that clock);
// busy is high while decoding; done pulses for one clock with u_hat valid
// (u_hat holds until the next start). Latency: done rises 2N-1 clocks after
// start.
module sc_decoder #(
  parameter int N    = 32,
  parameter int Q    = 6,    // channel LLR width
  parameter int W    = 8,    // internal LLR width
  parameter int LOGN = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [Q-1:0] llr_in [N],
  input  logic [N-1:0]        frozen,
  output logic                busy,
  output logic                done,
  output logic [N-1:0]        u_hat
);
  localparam logic signed [W-1:0] LMAX = W'((1 << (W-1)) - 1);
  localparam logic signed [W-1:0] LMIN = -LMAX;

  // alpha[l] holds the 2^l LLRs of the current node at level l
  // (level LOGN = channel, level 0 = leaf).
  logic signed [W-1:0] alpha [LOGN+1][N];
  logic [N-1:0]         frz_q;
  logic [$clog2(N)-1:0] leaf;      // leaf being worked towards
  logic [$clog2(LOGN+1)-1:0] lvl;  // level computed this clock
  logic                 do_g;      // this clock computes g (else f)

  function automatic logic signed [W-1:0] sat(logic signed [W+1:0] x);
    if (x > (W+2)'(LMAX)) return LMAX;
    if (x < (W+2)'(LMIN)) return LMIN;
    return W'(x);
  endfunction

  function automatic logic signed [W-1:0] f_op(logic signed [W-1:0] a,
                                               logic signed [W-1:0] b);
    logic signed [W-1:0] ma, mb, m;
    ma = (a < 0) ? -a : a;
    mb = (b < 0) ? -b : b;
    m  = (ma < mb) ? ma : mb;
    return ((a < 0) ^ (b < 0)) ? -m : m;
  endfunction

  function automatic logic signed [W-1:0] g_op(logic signed [W-1:0] a,
                                               logic signed [W-1:0] b,
                                               logic beta);
    logic signed [W+1:0] s;
    s = beta ? ((W+2)'(b) - (W+2)'(a)) : ((W+2)'(b) + (W+2)'(a));
    return sat(s);
  endfunction

  function automatic logic [N-1:0] ptrans(logic [N-1:0] u);
    logic [N-1:0] x;
    x = u;
    for (int s = 0; s < LOGN; s++)
      for (int k = 0; k < N; k++)
        if (((k >> s) & 1) == 0) x[k] = x[k] ^ x[k + (1 << s)];
    return x;
  endfunction

  function automatic int ctz(int v);
    for (int b = 0; b < LOGN; b++) if (((v >> b) & 1) == 1) return b;
    return LOGN;
  endfunction

  // ---- processing-unit row: one node of 2^lvl outputs per clock ----
  logic signed [W-1:0] pu_out [N/2];
  logic [N-1:0]        beta;
  logic                leaf_bit;

  always_comb begin
    int half;
    half = 1 << lvl;
    // partial sums of the left sibling, leaves [leaf-half, leaf)
    beta = ptrans((u_hat >> (int'(leaf) - half)) & ((N'(1) << half) - N'(1)));
    for (int k = 0; k < N/2; k++) begin
      pu_out[k] = '0;
      if (k < half) begin
        if (do_g) pu_out[k] = g_op(alpha[lvl+1][k], alpha[lvl+1][k+half], beta[k]);
        else      pu_out[k] = f_op(alpha[lvl+1][k], alpha[lvl+1][k+half]);
      end
    end
    leaf_bit = !frz_q[leaf] && (pu_out[0] < 0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      u_hat <= '0;
      frz_q <= '0;
      leaf  <= '0;
      lvl   <= '0;
      do_g  <= 1'b0;
      for (int l = 0; l <= LOGN; l++)
        for (int k = 0; k < N; k++) alpha[l][k] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        for (int k = 0; k < N; k++) alpha[LOGN][k] <= W'(llr_in[k]);
        frz_q <= frozen;
        u_hat <= '0;
        leaf  <= '0;
        lvl   <= ($clog2(LOGN+1))'(LOGN - 1);
        do_g  <= 1'b0;
        busy  <= 1'b1;
      end else if (busy) begin
        for (int k = 0; k < N/2; k++)
          if (k < (1 << lvl)) alpha[lvl][k] <= pu_out[k];
        if (lvl == 0) begin
          u_hat[leaf] <= leaf_bit;
          if (leaf == ($clog2(N))'(N - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            leaf <= leaf + 1'b1;
            lvl  <= ($clog2(LOGN+1))'(ctz(int'(leaf) + 1));
            do_g <= 1'b1;
          end
        end else begin
          lvl  <= lvl - 1'b1;
          do_g <= 1'b0;
        end
      end
    end
  end
endmodule
