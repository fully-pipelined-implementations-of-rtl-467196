// tb_gf_sq_scl_4: exhaustive check of square-and-scale, nu*x^2 with nu the subfield element 4'b0001, against GF(2^8) arithmetic.
module tb_gf_sq_scl_4;
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
  gf_sq_scl_4 dut (.x, .z);
  initial begin
    for (int a = 0; a < 16; a++) begin
      x = nib_t'(a); #1;
      check(z == nib_mul(4'b0001, nib_mul(x, x)), $sformatf("sqscl(%h)=%h", x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
