// tb_virtual_ram: writes random words to random addresses, keeps a shadow
// copy, and checks every read one clock later, including reads of an
// address written in the same clock (old data is returned).
module tb_virtual_ram;
  localparam int DEPTH = 512, WIDTH = 69;
  logic clk = 0, we = 0, re = 0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [DEPTH-1:0] written = '0;
  int checks = 0, failures = 0;

  virtual_ram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    return {5'($urandom), $urandom, $urandom};
  endfunction

  initial begin
    // fill everything once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = rnd();
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [WIDTH-1:0] expect_d;
      @(negedge clk);
      we = ($urandom % 2) == 1;
      waddr = 9'($urandom);
      wdata = rnd();
      re = 1;
      raddr = ((i % 5) == 0) ? waddr : 9'($urandom);
      expect_d = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rdata !== expect_d) begin failures++; $display("FAIL addr %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
