// tb_vram_dma: DMA and virtual-channel mapping on a small virtual RAM
// (64 words, 4 channels of 16). Fills one channel past its region to check
// drop-on-full and the overflow count, then drains all channels and checks
// per-channel order, round-robin service, one RAM read per word, and that
// every word lands in its channel's region; finally checks that a word is
// held while the decoder is busy.
module tb_vram_dma;
  import polar_pkg::*;
  localparam int DEPTH = 64, NV = 4;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, dec_ready = 0, dec_valid;
  vram_word_t wr_word = '0, ram_wdata, ram_rdata, dec_word;
  logic [1:0] wr_vch = '0, dec_vch;
  logic ram_we, ram_re;
  logic [5:0] ram_waddr, ram_raddr;
  logic [15:0] overflow_cnt;
  logic [NV-1:0] vch_empty;
  int checks = 0, failures = 0;

  vram_dma #(.DEPTH(DEPTH), .NUM_VCH(NV)) dut (.clk, .rst_n, .wr_valid, .wr_word,
    .wr_vch, .ram_we, .ram_waddr, .ram_wdata, .ram_re, .ram_raddr, .ram_rdata,
    .dec_valid, .dec_word, .dec_vch, .dec_ready, .overflow_cnt, .vch_empty);

  virtual_ram #(.DEPTH(DEPTH), .WIDTH(VRAM_W)) ram (.clk, .we(ram_we),
    .waddr(ram_waddr), .wdata(ram_wdata), .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected contents per channel, in order
  logic [31:0] q [NV][$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic push(int ch, logic [31:0] tag, bit expect_store);
    @(negedge clk);
    wr_valid = 1;
    wr_vch = 2'(ch);
    wr_word = '0;
    wr_word.enc.dc = tag;
    #1;
    if (expect_store) begin
      q[ch].push_back(tag);
      check(ram_we && ram_waddr[5:4] == 2'(ch), "write lands in channel region");
    end else begin
      check(!ram_we, "no write into a full region");
    end
    @(posedge clk);
    #1 wr_valid = 0;
  endtask

  initial begin
    int last_ch, got, reads;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) push(1, 32'h100 + i, i < 16);
    check(overflow_cnt == 16'd4, "4 frames dropped on a full region");
    for (int i = 0; i < 3; i++) push(0, 32'h000 + i, 1);
    for (int i = 0; i < 2; i++) push(3, 32'h300 + i, 1);
    @(negedge clk);
    check(vch_empty == 4'b0100, "empty flags");

    dec_ready = 1;
    got = 0;
    last_ch = -1;
    reads = 0;
    while (got < 21) begin
      @(posedge clk);
      if (ram_re) reads++;
      if (dec_valid && dec_ready) begin
        int ch;
        logic [31:0] e;
        ch = int'(dec_vch);
        e = q[ch].pop_front();
        check(dec_word.enc.dc == e, $sformatf("channel %0d order", ch));
        if (got == 0) check(ch == 0, "round robin starts at channel 0");
        if (got == 1) check(ch == 1, "round robin then channel 1");
        if (got == 2) check(ch == 3, "round robin skips empty channel 2");
        if (got > 0 && got < 6) check(ch != last_ch, "no channel served twice while others wait");
        last_ch = ch;
        got++;
      end
    end
    check(reads == 21, "one RAM read per word");
    @(negedge clk);
    check(vch_empty == 4'b1111, "all regions empty");

    // a word must wait while the decoder is not ready
    dec_ready = 0;
    push(2, 32'h200, 1);
    repeat (2) @(negedge clk);
    check(!dec_valid, "no read while the decoder is busy");
    dec_ready = 1;
    @(negedge clk);
    dec_ready = 0;
    repeat (3) @(negedge clk);
    check(dec_valid && dec_word.enc.dc == 32'h200, "word held for the decoder");
    dec_ready = 1;
    @(negedge clk);
    check(!dec_valid, "word released after acceptance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
