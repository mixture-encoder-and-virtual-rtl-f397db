// bist_misr: 16-bit multiple-input signature register.
//
// Compacts one 16-bit response word per enabled clock into a signature:
// the register shifts left, XORs in the feedback polynomial when the
// outgoing bit is 1, and XORs in the new word. The 16-bit width follows
// the source design; the polynomial x^16+x^12+x^5+1 (0x1021) and the zero
// seed are this design's choices.
// Interface: clear resets the signature; en absorbs din.
// Timing: sig is updated on the clock edge where en is high.
module bist_misr #(
  parameter logic [15:0] POLY = 16'h1021,
  parameter logic [15:0] SEED = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [15:0] din,
  output logic [15:0] sig
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear) sig <= SEED;
    else if (en)         sig <= ({sig[14:0], 1'b0} ^ (sig[15] ? POLY : 16'h0000)) ^ din;
  end
endmodule
