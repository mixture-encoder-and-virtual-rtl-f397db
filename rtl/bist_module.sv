// bist_module: built-in self-test and input gate placed ahead of the encoder.
//
// Self-test (after reset and on every bist_start): an 8-bit LFSR
// (x^8+x^6+x^3+x^2+1) produces 256 patterns; each is widened to a 32-bit
// word (the state p and the pattern index i give {p, rev(p), p^i,
// rev(p)^swap(i)}, so that every encoder pin toggles) and driven into the mixture encoder (the circuit under test) through
// test_pattern while test_active is high. The encoder's registered response
// is folded to 16 bits (XOR of its 16-bit slices) and compacted in a 16-bit MISR; after the last
// response the signature is compared with BIST_GOLDEN, the signature a
// fault-free encoder gives. On a match hw_ok rises and frames are let
// through; on a mismatch bist_fail is set and every frame is blocked until a
// new test passes. Pattern generator, signature width and pattern count
// follow the source design; the widening, folding, MISR polynomial and
// reference computed from the package's encoder model are this design's.
//
// Input gate (normal operation): a frame (information bits, rate mode,
// virtual channel, even parity bit over the information bits) is accepted
// when in_valid && in_ready, checked, and forwarded one clock later with the
// enable out_en. A frame whose parity is wrong is dropped and counted in
// parity_err_cnt. The parity check is this design's concrete form of the
// source design's real-time data check.
//
// Timing: the test takes BIST_PATTERNS issue cycles, one drain cycle for the
// encoder register and one compare cycle. Encoder latency must be one clock.
module bist_module
  import polar_pkg::*;
#(
  parameter int VCH_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bist_start,
  // frames in
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [K_MAX-1:0] in_info,
  input  rate_e            in_rate,
  input  logic [VCH_W-1:0] in_vch,
  input  logic             in_parity,
  // frames out, to the encoder controller
  output logic             out_en,
  output logic [K_MAX-1:0] out_info,
  output rate_e            out_rate,
  output logic [VCH_W-1:0] out_vch,
  // test stimulus to the encoder path and its response
  output logic             test_active,
  output logic [31:0]      test_pattern,
  input  logic             enc_valid,
  input  enc_word_t        enc_word,
  // status
  output logic             bist_done,
  output logic             hw_ok,
  output logic             bist_fail,
  output logic [15:0]      signature,
  output logic [15:0]      parity_err_cnt
);
  typedef enum logic [2:0] {S_RUN, S_DRAIN, S_CHECK, S_NORMAL, S_FAIL} state_e;
  state_e state;

  logic [8:0] issue_cnt;     // patterns issued
  logic [8:0] resp_cnt;      // responses absorbed
  logic       test_d1;       // test_active delayed by the encoder latency
  logic [7:0] lfsr_q;
  logic       lfsr_load, lfsr_step, misr_clear, misr_en;

  bist_lfsr #(.SEED(LFSR_SEED)) u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .step(lfsr_step), .q(lfsr_q));

  bist_misr #(.POLY(MISR_POLY), .SEED(MISR_SEED)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en),
    .din(response_fold(enc_word)), .sig(signature));

  assign test_active  = (state == S_RUN);
  assign test_pattern = bist_expand(lfsr_q, issue_cnt[7:0]);
  assign lfsr_step    = test_active;
  assign misr_en      = enc_valid && test_d1;
  assign in_ready     = (state == S_NORMAL) && !bist_start;
  assign hw_ok        = (state == S_NORMAL);
  assign bist_fail    = (state == S_FAIL);

  logic restart;
  assign restart    = bist_start && (state == S_NORMAL || state == S_FAIL);
  assign lfsr_load  = restart;
  assign misr_clear = restart;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_RUN;
      issue_cnt <= '0;
      resp_cnt  <= '0;
      test_d1   <= 1'b0;
      bist_done <= 1'b0;
    end else begin
      test_d1 <= test_active;
      if (misr_en) resp_cnt <= resp_cnt + 9'd1;
      unique case (state)
        S_RUN: begin
          issue_cnt <= issue_cnt + 9'd1;
          if (issue_cnt == 9'(BIST_PATTERNS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_CHECK;   // last response is absorbed this clock
        S_CHECK: begin
          bist_done <= 1'b1;
          state     <= (signature == BIST_GOLDEN && resp_cnt == 9'(BIST_PATTERNS))
                       ? S_NORMAL : S_FAIL;
        end
        S_NORMAL, S_FAIL: if (bist_start) begin
          state     <= S_RUN;
          issue_cnt <= '0;
          resp_cnt  <= '0;
          bist_done <= 1'b0;
        end
        default: state <= S_FAIL;
      endcase
    end
  end

  // ---- input register and integrity check ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_en         <= 1'b0;
      out_info       <= '0;
      out_rate       <= RATE_1_2;
      out_vch        <= '0;
      parity_err_cnt <= '0;
    end else begin
      out_en <= 1'b0;
      if (in_valid && in_ready) begin
        if ((^in_info) == in_parity) begin
          out_en   <= 1'b1;
          out_info <= in_info;
          out_rate <= in_rate;
          out_vch  <= in_vch;
        end else begin
          parity_err_cnt <= parity_err_cnt + 16'd1;
        end
      end
    end
  end

  // A test pattern and a data frame never reach the encoder together.
  assert property (@(posedge clk) disable iff (!rst_n) !(out_en && test_active));
endmodule
