// tb_sc_decoder: decodes random polar codewords of both rates, clean and
// with random LLR noise, and compares u_hat with a reference SC decoder
// that recomputes every leaf from the root. Clean words must decode to the
// transmitted vector. Checks the latency of 2N-1 = 63 clocks from start
// to done.
module tb_sc_decoder;
  import tb_ref_pkg::*;
  localparam int N = 32, Q = 6, AMP = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [Q-1:0] llr_in [N];
  logic [N-1:0] frozen = '0, u_hat;
  int checks = 0, failures = 0;

  sc_decoder #(.N(N), .Q(Q), .W(8)) dut (.clk, .rst_n, .start, .llr_in, .frozen, .busy, .done, .u_hat);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errors_corrected;
    errors_corrected = 0;
    for (int j = 0; j < N; j++) llr_in[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      bit r23;
      logic [31:0] u, x, exp_u;
      int llr [32];
      int lat, flips;
      bit noisy;
      r23 = (t % 2) == 1;
      noisy = (t >= 40);
      u = ref_place(21'($urandom), r23);
      x = ref_polar(u);
      frozen = ref_frozen(r23);
      flips = 0;
      for (int j = 0; j < N; j++) begin
        int s;
        s = (x[j] ? -AMP : AMP) + (noisy ? (int'($urandom % 25) - 12) : 0);
        if (s > 31) s = 31;
        if (s < -31) s = -31;
        llr[j] = s;
        llr_in[j] = Q'(s);
        if ((s < 0) != x[j]) flips++;
      end
      exp_u = ref_sc(llr, frozen);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (u_hat !== exp_u) begin
        failures++;
        $display("FAIL t=%0d u_hat=%h ref=%h", t, u_hat, exp_u);
      end
      checks++;
      if (lat != 2 * N - 1) begin failures++; $display("FAIL latency %0d", lat); end
      if (!noisy) begin
        checks++;
        if (u_hat !== u) begin failures++; $display("FAIL clean word t=%0d", t); end
      end else if (flips > 0 && u_hat == u) errors_corrected++;
      @(negedge clk);
    end
    $display("noisy words with hard-decision errors that SC corrected: %0d", errors_corrected);
    checks++;
    if (errors_corrected == 0) begin failures++; $display("FAIL no error was ever corrected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
