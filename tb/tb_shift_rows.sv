// tb_shift_rows: ShiftRows against the reference and a fixed known pattern.
module tb_shift_rows;
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
  block_t s, s_out;
  shift_rows dut (.s, .s_out);
  initial begin
    s = 128'h00112233_44556677_8899aabb_ccddeeff; #1;
    check(s_out == 128'h0055aaff_4499ee33_88dd2277_cc1166bb, "fixed pattern");
    for (int i = 0; i < 200; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom}; #1;
      check(s_out == aes_ref_pkg::shift_rows(s), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
