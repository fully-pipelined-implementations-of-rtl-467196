// tb_aes_stage_sweep: runs the unrolled cipher pipeline at 1, 2 and 4
// pipeline stages per round side by side (the default of 8 is covered by the
// pipeline and top-level testbenches). The same stream of random blocks with
// occasional gaps goes into all three; each must deliver the reference
// ciphertext exactly 1 + 10*STAGES cycles later (11, 21, 41) and sustain one
// block per cycle.
module tb_aes_stage_sweep;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int N = 300;
  localparam int ST [3] = '{1, 2, 4};

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

  logic   rst_n = 1'b0, in_valid = 1'b0;
  block_t in_block;
  round_keys_t rk;
  logic   out_valid [3];
  block_t out_block [3];
  block_t hist [N];
  block_t expct [N];
  logic   vhist [N];
  int     nout [3] = '{0, 0, 0};
  block_t key;

  for (genvar k = 0; k < 3; k++) begin : g_dut
    aes_pipeline #(.STAGES(ST[k])) dut (
      .clk, .rst_n, .in_valid, .in_block, .rk,
      .out_valid(out_valid[k]), .out_block(out_block[k]));
  end

  initial begin
    block_t kk [0:10];
    key = {$urandom, $urandom, $urandom, $urandom};
    expand(key, kk);
    for (int r = 0; r <= 10; r++) rk[r] = kk[r];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      hist[t]  = {$urandom, $urandom, $urandom, $urandom};
      vhist[t] = (t < 100) ? 1'b1 : 1'($urandom % 4 != 0);
      if (t >= N - 41) vhist[t] = 1'b0;
      expct[t] = vhist[t] ? encrypt(hist[t], key) : '0;
      in_block = hist[t];
      in_valid = vhist[t];
      #1;
      for (int k = 0; k < 3; k++) begin
        int lat;
        lat = 1 + 10 * ST[k];
        if (t >= lat) begin
          check(out_valid[k] == vhist[t-lat], $sformatf("valid S=%0d t=%0d", ST[k], t));
          if (vhist[t-lat]) begin
            nout[k]++;
            check(out_block[k] == expct[t-lat], $sformatf("data S=%0d t=%0d", ST[k], t));
          end
        end else check(!out_valid[k], "valid before latency");
      end
    end
    for (int k = 0; k < 3; k++) check(nout[k] > 150, "too few blocks");
    $display("blocks out: S1=%0d S2=%0d S4=%0d", nout[0], nout[1], nout[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
