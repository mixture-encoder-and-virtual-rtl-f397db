// tb_mix_unit: exhaustive check of the 4-input mixing unit against its
// truth table and against its six-term sum of products.
module tb_mix_unit;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic i0, i1, i2, i3, o;
  int checks = 0, failures = 0;

  mix_unit dut (.i0, .i1, .i2, .i3, .o);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {i3, i2, i1, i0} = 4'(v);
      #1;
      checks += 2;
      if (o !== ref_mix(i0, i1, i2, i3)) begin
        failures++;
        $display("FAIL truth table v=%0d o=%0b", v, o);
      end
      if (o !== ref_mix_sop(i0, i1, i2, i3)) begin
        failures++;
        $display("FAIL sum of products v=%0d o=%0b", v, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
