// tb_sbox: exhaustive check of the logic-only S-box against the textbook S-box, plus published table entries.
module tb_sbox;
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
  byte_t s, s_out;
  sbox dut (.s, .s_out);
  initial begin
    for (int a = 0; a < 256; a++) begin
      s = byte_t'(a); #1;
      check(s_out == aes_ref_pkg::sbox(s), $sformatf("S(%h)=%h", s, s_out));
      if (a == 8'h00) check(s_out == 8'h63, "S(00)");
      if (a == 8'h53) check(s_out == 8'hed, "S(53)");
      if (a == 8'hff) check(s_out == 8'h16, "S(ff)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
