// tb_aes_round: four rounds at 8, 4, 2 and 1 pipeline stages (the last two as final rounds without MixColumns) fed with random states, keys fixed and valid gaps; each must deliver the reference round result exactly STAGES cycles later and keep accepting one state per cycle.
module tb_aes_round;
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
  localparam int N = 400;
  localparam int ST [4] = '{8, 4, 2, 1};
  localparam bit LS [4] = '{0, 1, 0, 1};
  logic   rst_n = 1'b0, in_valid = 1'b0;
  block_t in_state, rk;
  logic   out_valid [4];
  block_t out_state [4];
  block_t hist [N];
  logic   vhist [N];
  int     nvalid [4] = '{0, 0, 0, 0};
  for (genvar k = 0; k < 4; k++) begin : g_dut
    aes_round #(.STAGES(ST[k]), .LAST(LS[k])) dut (
      .clk, .rst_n, .in_valid, .in_state, .rk, .out_valid(out_valid[k]), .out_state(out_state[k]));
  end
  initial begin
    rk = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      hist[t]  = {$urandom, $urandom, $urandom, $urandom};
      vhist[t] = (t < 100) ? 1'b1 : 1'($urandom % 4 != 0);
      in_state = hist[t];
      in_valid = vhist[t];
      #1;
      for (int k = 0; k < 4; k++) begin
        if (t >= ST[k]) begin
          check(out_valid[k] == vhist[t-ST[k]], $sformatf("valid k=%0d t=%0d", k, t));
          if (vhist[t-ST[k]]) begin
            nvalid[k]++;
            check(out_state[k] == round_fn(hist[t-ST[k]], rk, LS[k]), $sformatf("data k=%0d t=%0d", k, t));
          end
        end else check(!out_valid[k], "valid before latency");
      end
    end
    for (int k = 0; k < 4; k++) check(nvalid[k] > 250, "too few results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
