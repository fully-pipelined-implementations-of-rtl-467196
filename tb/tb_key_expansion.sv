// tb_key_expansion: key schedule: the published FIPS-197 key and random keys; all eleven round keys are compared with the reference schedule, and ready must rise exactly 10 cycles after key_load.
module tb_key_expansion;
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
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic   rst_n = 1'b0, key_load = 1'b0, ready;
  block_t key;
  round_keys_t rk;
  block_t exp_rk [0:10];
  key_expansion dut (.clk, .rst_n, .key_load, .key, .rk, .ready);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ready, "ready after reset");
    for (int n = 0; n < 8; n++) begin
      int cyc;
      cyc = 0;
      key = (n == 0) ? 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      key_load = 1'b1;
      @(negedge clk);
      key_load = 1'b0;
      while (!ready && cyc < 50) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == 10, $sformatf("ready after %0d cycles", cyc));
      expand(key, exp_rk);
      for (int r = 0; r <= 10; r++) check(rk[r] == exp_rk[r], $sformatf("key %0d round %0d", n, r));
      if (n == 0) check(rk[10] == 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6, "FIPS-197 round key 10");
      repeat (3) @(negedge clk);
      check(ready, "ready holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
