// encoder_controller: mode selection in front of the mixture encoder.
//
// In data mode it places the frame's information bits on the polar
// information set of the selected rate (rate 1/2: 16 bits, rate 2/3: 21
// bits) in ascending index order and sets every frozen position to 0,
// giving the 32-bit vector d the encoder works on. In test mode (the BIST
// is running) it passes the BIST pattern instead and enables the encoder
// on every cycle. The source design names this controller and its
// mode/DSP selection role only; the two rate modes are the two code rates
// it evaluates, and the information sets are this design's choice (5G NR
// reliability order restricted to N = 32).
// Purely combinational. Unused high bits of info are ignored at rate 1/2.
module encoder_controller
  import polar_pkg::*;
(
  input  logic             test_active,
  input  logic [31:0]      test_pattern,
  input  logic             frame_en,
  input  logic [K_MAX-1:0] info,
  input  rate_e            rate,
  output logic             enc_en,
  output logic [31:0]      enc_d
);
  logic [N-1:0] mask;
  logic [N-1:0] u;

  always_comb begin
    int k;
    mask = info_mask(rate);
    u    = '0;
    k    = 0;
    for (int j = 0; j < N; j++) begin
      if (mask[j]) begin
        u[j] = info[k];
        k    = k + 1;
      end
    end
    enc_en = test_active || frame_en;
    enc_d  = test_active ? test_pattern : u;
  end
endmodule
