// tb_mixture_encoder: checks the registered outputs dc, h1..h4, V and valid
// for directed and random inputs against an independent reference, the
// one-clock latency, and that outputs hold while en is low.
module tb_mixture_encoder;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, en = 0, valid;
  logic [31:0] d = '0, dc;
  logic [4:0]  h1, h2, h3, h4;
  logic [15:0] v;
  int checks = 0, failures = 0;

  mixture_encoder dut (.clk, .rst_n, .en, .d, .dc, .h1, .h2, .h3, .h4, .v, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(logic [31:0] din);
    ref_enc_t r;
    r = ref_encode(din);
    checks++;
    if (dc !== r.dc || h1 !== r.h[0] || h2 !== r.h[1] || h3 !== r.h[2] ||
        h4 !== r.h[3] || v !== r.v) begin
      failures++;
      $display("FAIL d=%h dc=%h/%h h=%h %h %h %h v=%h/%h", din, dc, r.dc,
               h1, h2, h3, h4, v, r.v);
    end
  endtask

  task automatic apply(logic [31:0] din);
    @(negedge clk);
    d  = din;
    en = 1;
    @(posedge clk);        // registered here
    @(negedge clk);
    en = 0;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid not set one clock later"); end
    check_out(din);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // A single bit at position 12: only h2 bit 0 is set, V = 0x1000.
    apply(32'd4096);
    checks++;
    if (h1 !== 5'd0 || h2 !== 5'd1 || h3 !== 5'd0 || h4 !== 5'd0 || v !== 16'h1000) begin
      failures++;
      $display("FAIL 4096 case h=%b %b %b %b v=%h", h1, h2, h3, h4, v);
    end
    apply(32'd2500);
    // Printed example: hh1 = 01101, hh2 = 01100, upper lanes zero, V = 2500.
    checks++;
    if (h1 !== 5'b01101 || h2 !== 5'b01100 || h3 !== 5'd0 || h4 !== 5'd0 || v !== 16'd2500) begin
      failures++;
      $display("FAIL 2500 case h=%b %b %b %b v=%h", h1, h2, h3, h4, v);
    end
    apply(32'h0000_0000);
    apply(32'hFFFF_FFFF);
    for (int i = 0; i < 300; i++) apply($urandom);
    // en low: outputs must hold and valid must drop.
    begin
      logic [31:0] dc_hold;
      dc_hold = dc;
      @(negedge clk);
      d = 32'h1234_5678;
      repeat (3) @(posedge clk);
      @(negedge clk);
      checks++;
      if (dc !== dc_hold || valid) begin failures++; $display("FAIL outputs moved with en=0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
