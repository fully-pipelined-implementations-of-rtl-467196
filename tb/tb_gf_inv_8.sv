// tb_gf_inv_8: exhaustive check of the composite-field GF(2^8) inverter: for every byte a, gf_inv_8(X^-1 a) must equal X^-1 (a^-1) computed in the standard basis.
module tb_gf_inv_8;
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
  byte_t x, z;
  gf_inv_8 dut (.x, .z);
  initial begin
    for (int a = 0; a < 256; a++) begin
      x = to_int(u8'(a)); #1;
      check(z == to_int(ginv(u8'(a))), $sformatf("inv(%h)", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
