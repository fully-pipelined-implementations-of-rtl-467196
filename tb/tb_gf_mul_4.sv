// tb_gf_mul_4: exhaustive check of the GF(2^4) multiplier against GF(2^8) multiplication of the corresponding subfield elements.
module tb_gf_mul_4;
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
  nib_t x, y, z;
  gf_mul_4 dut (.x, .y, .z);
  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        x = nib_t'(a); y = nib_t'(b); #1;
        check(z == nib_mul(x, y), $sformatf("%h*%h=%h exp %h", x, y, z, nib_mul(x, y)));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
