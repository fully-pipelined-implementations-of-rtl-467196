// tb_aes_pipeline: the unrolled 10-round pipeline at its default 8 stages per round: FIPS-197 vectors, then a stream of random blocks with gaps; each must leave exactly 81 cycles after entering, one block per cycle.
module tb_aes_pipeline;
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
  localparam int N = 500, LAT = 81;
  logic   rst_n = 1'b0, in_valid = 1'b0, out_valid;
  block_t in_block, out_block;
  round_keys_t rk;
  block_t hist [N];
  logic   vhist [N];
  int     nout = 0;
  aes_pipeline dut (.clk, .rst_n, .in_valid, .in_block, .rk, .out_valid, .out_block);
  initial begin
    block_t k [0:10];
    expand(128'h00010203_04050607_08090a0b_0c0d0e0f, k);
    for (int r = 0; r <= 10; r++) rk[r] = k[r];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      hist[t]  = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) hist[t] = 128'h00112233_44556677_8899aabb_ccddeeff;
      vhist[t] = (t < 200) ? 1'b1 : 1'($urandom % 3 != 0);
      if (t >= N - LAT) vhist[t] = 1'b0;
      in_block = hist[t];
      in_valid = vhist[t];
      #1;
      if (t >= LAT) begin
        check(out_valid == vhist[t-LAT], $sformatf("valid t=%0d", t));
        if (vhist[t-LAT]) begin
          nout++;
          check(out_block == encrypt(hist[t-LAT], 128'h00010203_04050607_08090a0b_0c0d0e0f),
                $sformatf("data t=%0d", t));
          if (t == LAT) check(out_block == 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, "FIPS-197 C.1");
        end
      end else check(!out_valid, "valid before latency");
    end
    check(nout > 300, "too few blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
