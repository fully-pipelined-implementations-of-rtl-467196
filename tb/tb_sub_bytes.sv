// tb_sub_bytes: random stream through the fully registered SubBytes (6 cycles latency, one state per cycle); every output is compared with the textbook S-box applied to the input six cycles earlier. A second instance with no registers checks the combinational form.
module tb_sub_bytes;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int N = 300, LAT = 6;
  block_t s, s_out, s_out0;
  block_t hist [N];
  sub_bytes dut (.clk, .s, .s_out);
  sub_bytes #(.CUT(6'b000000)) dut0 (.clk, .s, .s_out(s_out0));
  initial begin
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      hist[t] = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) hist[t] = '0;
      s = hist[t];
      #1;
      check(s_out0 == aes_ref_pkg::sub_bytes(s), "combinational");
      if (t >= LAT) check(s_out == aes_ref_pkg::sub_bytes(hist[t-LAT]), $sformatf("cycle %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
