// vram_dma: virtual-channel mapping and direct memory access for the
// virtual RAM.
//
// The RAM is split into NUM_VCH equal regions, one per virtual channel;
// address = {channel, slot}. Each region is a circular buffer with its own
// write pointer, read pointer and fill count. Write side: every valid
// encoder word is written into the region of its channel in the same
// clock; when that region is full the word is dropped and counted in
// overflow_cnt. Read side: when the decoder is ready and no read is in
// flight, the next non-empty channel in round-robin order is read; the word
// appears one clock later on dec_valid together with its channel and stays
// until dec_ready accepts it. The source design states that encoded data is
// mapped to memory regions through virtual channels and moved by DMA; the
// region split, circular buffers, drop-on-full and round-robin are this
// design's choices. ram_wdata and the channel bits of ram_waddr are the
// encoder word and its channel passed straight through: the DMA only adds
// the slot address and the write enable on the write side.
module vram_dma
  import polar_pkg::*;
#(
  parameter int DEPTH   = 512,
  parameter int NUM_VCH = 4,
  parameter int VCH_W   = $clog2(NUM_VCH),
  parameter int ADDR_W  = $clog2(DEPTH),
  parameter int SLOT_W  = ADDR_W - VCH_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // encoder side
  input  logic              wr_valid,
  input  vram_word_t        wr_word,
  input  logic [VCH_W-1:0]  wr_vch,
  // RAM ports
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_waddr,
  output vram_word_t        ram_wdata,
  output logic              ram_re,
  output logic [ADDR_W-1:0] ram_raddr,
  input  vram_word_t        ram_rdata,
  // decoder side
  output logic              dec_valid,
  output vram_word_t        dec_word,
  output logic [VCH_W-1:0]  dec_vch,
  input  logic              dec_ready,
  // status
  output logic [15:0]       overflow_cnt,
  output logic [NUM_VCH-1:0] vch_empty
);
  localparam int SLOTS = 1 << SLOT_W;

  logic [SLOT_W-1:0] wptr [NUM_VCH];
  logic [SLOT_W-1:0] rptr [NUM_VCH];
  logic [SLOT_W:0]   cnt  [NUM_VCH];

  logic              rd_pending;     // read issued, data arrives next clock
  logic [VCH_W-1:0]  rd_ch_q;
  logic [VCH_W-1:0]  rr_last;        // channel served last
  logic              hold_valid;     // word waiting for the decoder

  // ---- write side ----
  logic wr_full;
  assign wr_full   = (cnt[wr_vch] == (SLOT_W+1)'(SLOTS));
  assign ram_we    = wr_valid && !wr_full;
  assign ram_waddr = {wr_vch, wptr[wr_vch]};
  assign ram_wdata = wr_word;

  // ---- read arbitration: round-robin over non-empty channels ----
  logic             pick_ok;
  logic [VCH_W-1:0] pick_ch;
  always_comb begin
    pick_ok = 1'b0;
    pick_ch = '0;
    for (int i = 1; i <= NUM_VCH; i++) begin
      logic [VCH_W-1:0] c;
      c = VCH_W'((int'(rr_last) + i) % NUM_VCH);
      if (!pick_ok && !vch_empty[c]) begin
        pick_ok = 1'b1;
        pick_ch = c;
      end
    end
  end

  for (genvar c = 0; c < NUM_VCH; c++) begin : g_empty
    assign vch_empty[c] = (cnt[c] == '0);
  end

  assign ram_re    = pick_ok && dec_ready && !rd_pending && !hold_valid;
  assign ram_raddr = {pick_ch, rptr[pick_ch]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_VCH; c++) begin
        wptr[c] <= '0;
        rptr[c] <= '0;
        cnt[c]  <= '0;
      end
      rd_pending   <= 1'b0;
      rd_ch_q      <= '0;
      rr_last      <= VCH_W'(NUM_VCH - 1);
      hold_valid   <= 1'b0;
      dec_word     <= '0;
      dec_vch      <= '0;
      overflow_cnt <= '0;
    end else begin
      for (int c = 0; c < NUM_VCH; c++) begin
        logic inc, dec;
        inc = ram_we && (wr_vch == VCH_W'(c));
        dec = ram_re && (pick_ch == VCH_W'(c));
        if (inc) wptr[c] <= wptr[c] + 1'b1;
        if (dec) rptr[c] <= rptr[c] + 1'b1;
        cnt[c] <= cnt[c] + (SLOT_W+1)'(inc) - (SLOT_W+1)'(dec);
      end
      if (wr_valid && wr_full) overflow_cnt <= overflow_cnt + 16'd1;

      rd_pending <= ram_re;
      if (ram_re) begin
        rd_ch_q <= pick_ch;
        rr_last <= pick_ch;
      end
      if (rd_pending) begin
        hold_valid <= 1'b1;
        dec_word   <= ram_rdata;
        dec_vch    <= rd_ch_q;
      end else if (hold_valid && dec_ready) begin
        hold_valid <= 1'b0;
      end
    end
  end

  assign dec_valid = hold_valid;
endmodule
