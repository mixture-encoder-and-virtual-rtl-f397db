// virtual_ram: the memory that takes the place of the channel.
//
// A simple dual-port synchronous RAM: one write port on the encoder side,
// one read port on the decoder side, both clocked by clk. Encoded words are
// stored at an address and read back unchanged, so the "channel" is a
// deterministic, address-mapped store rather than a noise model. The
// default 512 x 69-bit size is this design's choice, sized to the two
// 18 Kbit block RAMs the source design reports for the decoder side
// (512 words of up to 72 bits). Written as an array so synthesis can map
// it to block RAM. Contents are not reset.
// Timing: write on the clock edge with we; rdata is valid one clock after
// re (read-first on an address collision).
module virtual_ram #(
  parameter int DEPTH  = 512,
  parameter int WIDTH  = 69,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
