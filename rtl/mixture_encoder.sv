// mixture_encoder: 32-bit parallel encoder with hash and verification outputs.
//
// Function (from the source design): dc = M*d xor H, where M is derived from
// the polar generator matrix F^(x)5, plus four 5-bit hashes h1..h4 and a
// 16-bit verification vector V, all registered; en activates the encoder so
// the registers do not toggle when no encoding is needed.
// Structure, in the four layers the design names:
//   1. XOR pre-mixing: the five butterfly stages of the polar transform.
//   2. AND/XOR mapping: mix_unit instances (O = I0^I1^(I2&I3)), four per
//      byte lane.
//   3. parity/hash: lane parity plus the four mixing outputs give h1..h4;
//      H spreads them over the low five bits of each byte lane; V is the
//      16-bit fold d[31:16]^d[15:0].
//   4. output registers.
// This design's own choices: which lane bits feed each mixing unit (picked
// so that the two published waveform examples come out right: input 4096
// gives h2 = 00001 and the other hashes zero; input 2500 gives h1 = 01101,
// h2 = 01100; every lane bit feeds exactly two units), how H and V are
// formed, and the valid output.
// Timing: outputs change one clock after a cycle with en = 1; valid marks
// that cycle. Reset (active low, synchronous) clears all outputs.
module mixture_encoder
  import polar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] d,
  output logic [31:0] dc,
  output logic [4:0]  h1,
  output logic [4:0]  h2,
  output logic [4:0]  h3,
  output logic [4:0]  h4,
  output logic [15:0] v,
  output logic        valid
);
  // ---- layer 1: polar butterfly network ----
  logic [31:0] stage [LOGN+1];
  assign stage[0] = d;
  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    for (genvar k = 0; k < N; k++) begin : g_bit
      if (((k >> s) & 1) == 0) begin : g_xor
        assign stage[s+1][k] = stage[s][k] ^ stage[s][k + (1 << s)];
      end else begin : g_pass
        assign stage[s+1][k] = stage[s][k];
      end
    end
  end

  // ---- layers 2 and 3: mixing units and hashes, one set per byte lane ----
  logic [4:0] h_lane [4];
  for (genvar l = 0; l < 4; l++) begin : g_lane
    logic [7:0] s;
    assign s = d[8*l +: 8];
    assign h_lane[l][0] = ^s;
    mix_unit u_m1 (.i0(s[0]), .i1(s[3]), .i2(s[1]), .i3(s[2]), .o(h_lane[l][1]));
    mix_unit u_m2 (.i0(s[0]), .i1(s[2]), .i2(s[4]), .i3(s[5]), .o(h_lane[l][2]));
    mix_unit u_m3 (.i0(s[3]), .i1(s[6]), .i2(s[5]), .i3(s[7]), .o(h_lane[l][3]));
    mix_unit u_m4 (.i0(s[6]), .i1(s[7]), .i2(s[1]), .i3(s[4]), .o(h_lane[l][4]));
  end

  logic [31:0] hvec;
  assign hvec = expand_h(h_lane[0], h_lane[1], h_lane[2], h_lane[3]);

  // ---- layer 4: output registers ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dc    <= '0;
      h1    <= '0;
      h2    <= '0;
      h3    <= '0;
      h4    <= '0;
      v     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        dc <= stage[LOGN] ^ hvec;
        h1 <= h_lane[0];
        h2 <= h_lane[1];
        h3 <= h_lane[2];
        h4 <= h_lane[3];
        v  <= d[31:16] ^ d[15:0];
      end
    end
  end
endmodule
