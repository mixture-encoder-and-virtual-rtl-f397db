// output_assembler: rebuilds the transmitted frame from a decoded vector.
//
// Takes the 32-bit decoded vector u_hat and the frame's rate mode, and
// gathers the bits at the information positions (ascending index order)
// into the information word, the inverse of encoder_controller. Frozen
// positions are dropped; unused high bits at rate 1/2 are zero. Status
// bits travel with the frame. The source design gives this stage's role
// (extract u_hat at the information set); the register stage is this
// design's choice.
// Timing: one clock from in_valid to out_valid.
module output_assembler
  import polar_pkg::*;
#(
  parameter int VCH_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N-1:0]     u_hat,
  input  rate_e            in_rate,
  input  logic [VCH_W-1:0] in_vch,
  input  logic             in_hash_ok,
  input  logic             in_early,
  output logic             out_valid,
  output logic [K_MAX-1:0] out_info,
  output rate_e            out_rate,
  output logic [VCH_W-1:0] out_vch,
  output logic             out_hash_ok,
  output logic             out_early
);
  logic [K_MAX-1:0] info;

  always_comb begin
    logic [N-1:0] mask;
    int k;
    mask = info_mask(in_rate);
    info = '0;
    k    = 0;
    for (int j = 0; j < N; j++) begin
      if (mask[j]) begin
        info[k] = u_hat[j];
        k       = k + 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_info    <= '0;
      out_rate    <= RATE_1_2;
      out_vch     <= '0;
      out_hash_ok <= 1'b0;
      out_early   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_info    <= info;
        out_rate    <= in_rate;
        out_vch     <= in_vch;
        out_hash_ok <= in_hash_ok;
        out_early   <= in_early;
      end
    end
  end
endmodule
