// vram_polar_decoder: receiver of the virtual-RAM channel.
//
// Accepts one stored frame (dc, h1..h4, V, rate) from the DMA and:
//  1. strips the hash word: x = dc xor H(h1..h4);
//  2. maps each bit to a channel LLR, +AMP for 0 and -AMP for 1, adds the
//     signed value on noise[j] (the hook where artificial noise is injected
//     in front of the decoder) and saturates to Q bits;
//  3. early termination before decoding: the hard decisions y are
//     transformed back (u = y * F^(x)5); if every frozen position of u is 0
//     and the smallest |LLR| is at least et_thresh, u is taken as the
//     result and the SC decoder is not started (early = 1);
//  4. otherwise runs sc_decoder (62 compute clocks);
//  5. recomputes h1..h4 and V from the decoded vector and reports
//     hash_ok when they equal the received ones.
// The source design gives the memory-based channel, the SC decoder, the
// optional early stop on a reliability threshold and the hash/V checks;
// the LLR mapping, the syndrome-plus-threshold test and AMP are this
// design's choices.
// Interface: in_valid/in_ready handshake (ready only when idle); out_valid
// pulses one clock with d_correct (the decoded 32-bit vector), hash_ok,
// early, rate and channel.
// Timing: early-terminated frames: out_valid 3 clocks after acceptance;
// decoded frames: 2 + 2N-1 + 1 = 66 clocks after acceptance.
module vram_polar_decoder
  import polar_pkg::*;
#(
  parameter int Q     = 6,
  parameter int W     = 8,
  parameter int AMP   = 8,
  parameter int VCH_W = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  vram_word_t          in_word,
  input  logic [VCH_W-1:0]    in_vch,
  input  logic signed [Q-1:0] noise [N],
  input  logic [Q-1:0]        et_thresh,
  output logic                out_valid,
  output logic [N-1:0]        d_correct,
  output logic                hash_ok,
  output logic                early,
  output rate_e               out_rate,
  output logic [VCH_W-1:0]    out_vch
);
  localparam int QMAX = (1 << (Q-1)) - 1;

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_DECODE, S_OUT} state_e;
  state_e state;

  logic signed [Q-1:0] llr_q [N];
  enc_word_t           enc_q;
  rate_e               rate_q;
  logic [VCH_W-1:0]    vch_q;
  logic [N-1:0]        frozen_q;
  logic [N-1:0]        result_q;

  // ---- LLR mapping with injected noise ----
  logic [N-1:0]        x_in;
  logic signed [Q-1:0] llr_map [N];
  always_comb begin
    x_in = in_word.enc.dc ^ expand_h(in_word.enc.h1, in_word.enc.h2,
                                     in_word.enc.h3, in_word.enc.h4);
    for (int j = 0; j < N; j++) begin
      int s;
      s = (x_in[j] ? -AMP : AMP) + int'(noise[j]);
      if (s > QMAX)  s = QMAX;
      if (s < -QMAX) s = -QMAX;
      llr_map[j] = Q'(s);
    end
  end

  // ---- early-termination test ----
  logic [N-1:0] y_hd, u_chk;
  logic         reliable, syndrome_ok;
  always_comb begin
    reliable = 1'b1;
    for (int j = 0; j < N; j++) begin
      logic [Q-1:0] mag;
      y_hd[j] = llr_q[j] < 0;
      mag     = (llr_q[j] < 0) ? Q'(-llr_q[j]) : Q'(llr_q[j]);
      if (mag < et_thresh) reliable = 1'b0;
    end
    u_chk       = polar_transform(y_hd);
    syndrome_ok = (u_chk & frozen_q) == '0;
  end

  // ---- SC decoder ----
  logic          sc_start, sc_busy, sc_done;
  logic [N-1:0]  sc_u;
  assign sc_start = (state == S_CHECK) && !(syndrome_ok && reliable);

  sc_decoder #(.N(N), .Q(Q), .W(W)) u_sc (
    .clk, .rst_n, .start(sc_start), .llr_in(llr_q), .frozen(frozen_q),
    .busy(sc_busy), .done(sc_done), .u_hat(sc_u));

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      enc_q     <= '0;
      rate_q    <= RATE_1_2;
      vch_q     <= '0;
      frozen_q  <= '0;
      result_q  <= '0;
      early     <= 1'b0;
      out_valid <= 1'b0;
      d_correct <= '0;
      hash_ok   <= 1'b0;
      out_rate  <= RATE_1_2;
      out_vch   <= '0;
      for (int j = 0; j < N; j++) llr_q[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          for (int j = 0; j < N; j++) llr_q[j] <= llr_map[j];
          enc_q    <= in_word.enc;
          rate_q   <= in_word.rate;
          vch_q    <= in_vch;
          frozen_q <= ~info_mask(in_word.rate);
          state    <= S_CHECK;
        end
        S_CHECK: begin
          if (syndrome_ok && reliable) begin
            result_q <= u_chk;
            early    <= 1'b1;
            state    <= S_OUT;
          end else begin
            early    <= 1'b0;
            state    <= S_DECODE;
          end
        end
        S_DECODE: if (sc_done) begin
          result_q <= sc_u;
          state    <= S_OUT;
        end
        S_OUT: begin
          enc_word_t chk;
          chk = encode(result_q);
          out_valid <= 1'b1;
          d_correct <= result_q;
          hash_ok   <= chk.h1 == enc_q.h1 && chk.h2 == enc_q.h2 &&
                       chk.h3 == enc_q.h3 && chk.h4 == enc_q.h4 &&
                       chk.v == enc_q.v;
          out_rate  <= rate_q;
          out_vch   <= vch_q;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
