// tb_mix_columns: MixColumns with the middle register (one cycle latency) and without it, against the reference and the published column example db 13 53 45 -> 8e 4d a1 bc.
module tb_mix_columns;
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
  localparam int N = 200;
  block_t s, s_out, s_out0;
  block_t hist [N];
  mix_columns dut (.clk, .s, .s_out);
  mix_columns #(.CUT_MID(1'b0)) dut0 (.clk, .s, .s_out(s_out0));
  initial begin
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      hist[t] = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) hist[t] = {4{32'hdb135345}};
      s = hist[t];
      #1;
      check(s_out0 == aes_ref_pkg::mix_columns(s), "combinational");
      if (t == 0) check(s_out0 == {4{32'h8e4da1bc}}, "known column");
      if (t >= 1) check(s_out == aes_ref_pkg::mix_columns(hist[t-1]), $sformatf("cycle %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
