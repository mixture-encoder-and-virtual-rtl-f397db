// bist_lfsr: 8-bit pattern generator of the built-in self-test.
//
// Fibonacci LFSR for the polynomial x^8 + x^6 + x^3 + x^2 + 1 given by the
// source design: each step shifts left and feeds back the XOR of stages
// 8, 6, 3 and 2. The polynomial is primitive, so the sequence repeats
// every 255 steps. The seed (8'h01) is this design's choice.
// Interface: load restarts from SEED; step advances one state per clock.
// Timing: q shows the current state; it changes one clock after step.
module bist_lfsr #(
  parameter logic [7:0] SEED = 8'h01
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       step,
  output logic [7:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n || load) q <= SEED;
    else if (step)      q <= {q[6:0], q[7] ^ q[5] ^ q[2] ^ q[1]};
  end
endmodule
