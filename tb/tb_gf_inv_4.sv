// tb_gf_inv_4: exhaustive check of the GF(2^4) inverter against inversion in GF(2^8) of the subfield element (0 maps to 0).
module tb_gf_inv_4;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  nib_t x, z;
  gf_inv_4 dut (.x, .z);
  initial begin
    for (int a = 0; a < 16; a++) begin
      x = nib_t'(a); #1;
      check(z == nib_inv(x), $sformatf("inv(%h)=%h exp %h", x, z, nib_inv(x)));
      if (a != 0) check(nib_mul(x, z) == 4'hf, "x*inv(x) is not one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
