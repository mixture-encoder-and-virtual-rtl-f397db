// mix_unit: the 4-input local mixing unit of the mixture encoder.
//
// The source design gives this unit as a six-term sum of products over
// I0..I3 (Karnaugh-minimised from its truth table). That sum of products
// equals I0 ^ I1 ^ (I2 & I3): an XOR pre-mix of I0 and I1 followed by an
// AND mapping of I2 and I3, which is the form written here. Purely
// combinational, no clock. Interface: four input bits, one output bit.
// The mixture encoder replicates this unit over its 32-bit input.
module mix_unit (
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  output logic o
);
  logic premix;   // layer 1: XOR pre-mixing
  logic andmap;   // layer 2: AND mapping

  always_comb begin
    premix = i0 ^ i1;
    andmap = i2 & i3;
    o      = premix ^ andmap;
  end
endmodule
