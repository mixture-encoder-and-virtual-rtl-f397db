// polar5g_top: complete transmit / virtual-RAM channel / receive chain.
//
// Data flow (left to right):
//   frame in -> bist_module (input register, parity check, self-test)
//            -> encoder_controller (rate-mode bit placement, test mux)
//            -> mixture_encoder (dc = polar(d) xor H, h1..h4, V)
//            -> vram_dma + virtual_ram (per-virtual-channel regions)
//            -> vram_polar_decoder (LLR mapping + noise, early termination,
//               SC decoding, hash/V verification)
//            -> output_assembler (information bits back out).
// The self-test runs after reset (about 258 clocks) and on each bist_start;
// frames are refused (in_ready = 0) while it runs or after it has failed.
// The transmit side accepts one frame per clock; the receive side takes 3
// clocks for an early-terminated frame and 66 for an SC-decoded one, so the
// virtual RAM absorbs bursts; a frame arriving for a full region is dropped
// and counted in overflow_cnt. noise[] is added to the channel LLRs in
// front of the decoder (drive zeros for a clean channel). The chain follows
// the source design's block diagram; all widths and handshakes not given
// there are this design's and are explained in each block.
module polar5g_top
  import polar_pkg::*;
#(
  parameter int VRAM_DEPTH = 512,
  parameter int NUM_VCH    = 4,
  parameter int VCH_W      = $clog2(NUM_VCH),
  parameter int Q          = 6,
  parameter int W          = 8,
  parameter int AMP        = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bist_start,
  // frames in
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [K_MAX-1:0]    in_info,
  input  rate_e               in_rate,
  input  logic [VCH_W-1:0]    in_vch,
  input  logic                in_parity,
  // channel noise injection and early-termination threshold
  input  logic signed [Q-1:0] noise [N],
  input  logic [Q-1:0]        et_thresh,
  // frames out
  output logic                out_valid,
  output logic [K_MAX-1:0]    out_info,
  output rate_e               out_rate,
  output logic [VCH_W-1:0]    out_vch,
  output logic                out_hash_ok,
  output logic                out_early,
  // status
  output logic                bist_done,
  output logic                hw_ok,
  output logic                bist_fail,
  output logic [15:0]         bist_signature,
  output logic [15:0]         parity_err_cnt,
  output logic [15:0]         overflow_cnt
);
  localparam int ADDR_W = $clog2(VRAM_DEPTH);

  // ---- transmit side ----
  logic             fr_en;
  logic [K_MAX-1:0] fr_info;
  rate_e            fr_rate;
  logic [VCH_W-1:0] fr_vch;
  logic             test_active;
  logic [31:0]      test_pattern;
  logic             enc_en, enc_valid;
  logic [31:0]      enc_d;
  enc_word_t        enc_word;

  bist_module #(.VCH_W(VCH_W)) u_bist (
    .clk, .rst_n, .bist_start,
    .in_valid, .in_ready, .in_info, .in_rate, .in_vch, .in_parity,
    .out_en(fr_en), .out_info(fr_info), .out_rate(fr_rate), .out_vch(fr_vch),
    .test_active, .test_pattern, .enc_valid, .enc_word,
    .bist_done, .hw_ok, .bist_fail, .signature(bist_signature), .parity_err_cnt);

  encoder_controller u_ctrl (
    .test_active, .test_pattern, .frame_en(fr_en), .info(fr_info),
    .rate(fr_rate), .enc_en, .enc_d);

  mixture_encoder u_enc (
    .clk, .rst_n, .en(enc_en), .d(enc_d),
    .dc(enc_word.dc), .h1(enc_word.h1), .h2(enc_word.h2), .h3(enc_word.h3),
    .h4(enc_word.h4), .v(enc_word.v), .valid(enc_valid));

  // Rate and channel of the frame inside the encoder register; test
  // responses are not forwarded to the channel.
  rate_e            enc_rate;
  logic [VCH_W-1:0] enc_vch;
  logic             enc_is_data;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enc_rate    <= RATE_1_2;
      enc_vch     <= '0;
      enc_is_data <= 1'b0;
    end else begin
      enc_is_data <= fr_en && !test_active;
      if (fr_en) begin
        enc_rate <= fr_rate;
        enc_vch  <= fr_vch;
      end
    end
  end

  // ---- virtual RAM channel ----
  vram_word_t        wr_word, ram_wdata, ram_rdata, dec_word;
  logic              ram_we, ram_re;
  logic [ADDR_W-1:0] ram_waddr, ram_raddr;
  logic              dec_valid, dec_ready;
  logic [VCH_W-1:0]  dec_vch;
  logic [NUM_VCH-1:0] vch_empty;

  assign wr_word.rate = enc_rate;
  assign wr_word.enc  = enc_word;

  vram_dma #(.DEPTH(VRAM_DEPTH), .NUM_VCH(NUM_VCH)) u_dma (
    .clk, .rst_n,
    .wr_valid(enc_valid && enc_is_data), .wr_word, .wr_vch(enc_vch),
    .ram_we, .ram_waddr, .ram_wdata, .ram_re, .ram_raddr, .ram_rdata,
    .dec_valid, .dec_word, .dec_vch, .dec_ready,
    .overflow_cnt, .vch_empty);

  virtual_ram #(.DEPTH(VRAM_DEPTH), .WIDTH(VRAM_W)) u_vram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));

  // ---- receive side ----
  logic          dv;
  logic [N-1:0]  d_correct;
  logic          d_hash_ok, d_early;
  rate_e         d_rate;
  logic [VCH_W-1:0] d_vch;

  vram_polar_decoder #(.Q(Q), .W(W), .AMP(AMP), .VCH_W(VCH_W)) u_dec (
    .clk, .rst_n, .in_valid(dec_valid), .in_ready(dec_ready),
    .in_word(dec_word), .in_vch(dec_vch), .noise, .et_thresh,
    .out_valid(dv), .d_correct, .hash_ok(d_hash_ok), .early(d_early),
    .out_rate(d_rate), .out_vch(d_vch));

  output_assembler #(.VCH_W(VCH_W)) u_out (
    .clk, .rst_n, .in_valid(dv), .u_hat(d_correct), .in_rate(d_rate),
    .in_vch(d_vch), .in_hash_ok(d_hash_ok), .in_early(d_early),
    .out_valid, .out_info, .out_rate, .out_vch, .out_hash_ok, .out_early);
endmodule
