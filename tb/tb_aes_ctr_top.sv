// tb_aes_ctr_top: end-to-end test of the whole engine at its default
// parameters (8 pipeline stages per round, 82 cycles latency). It loads a key,
// runs the published ECB (FIPS-197) and CTR (SP 800-38A F.5.1) vectors, then
// long back-to-back streams of random blocks with random modes, a counter
// whose increment carries across 32-bit and 64-bit word boundaries, an
// iv_load in the same cycle as a CTR block, blocks offered before the keys
// are ready (which must be dropped) and a key change. A scoreboard holds the
// reference result and issue cycle of every accepted block; each output must
// match it exactly 82 cycles after issue. Each mechanism is counted and must
// have happened at least once.
module tb_aes_ctr_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int LAT = 82;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   rst_n = 1'b0, key_load = 1'b0, keys_ready, iv_load = 1'b0, mode_ctr = 1'b0;
  logic   in_valid = 1'b0, in_ready, out_valid;
  block_t key = '0, iv = '0, in_data = '0, out_data;

  aes_ctr_top dut (.*);

  // reference state
  block_t cur_key, ref_ctr;
  int     cycle = 0;
  typedef struct packed { block_t data; int cyc; } exp_t;
  exp_t   sb [$];
  int     n_ecb = 0, n_ctr = 0, n_drop = 0, n_switch = 0, n_carry32 = 0, n_carry64 = 0,
          n_iv_same = 0, n_keyload = 0, run = 0, max_run = 0;
  logic   last_mode = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard on outputs
  always @(negedge clk)
    if (rst_n) begin
      if (out_valid) begin
        run++;
        if (run > max_run) max_run = run;
        check(sb.size() > 0, "output with nothing expected");
        if (sb.size() > 0) begin
          exp_t e;
          e = sb.pop_front();
          check(out_data == e.data, $sformatf("data at cycle %0d", cycle));
          check(cycle - e.cyc == LAT, $sformatf("latency %0d", cycle - e.cyc));
        end
      end else run = 0;
    end

  // offer one block in the current cycle (inputs set at negedge)
  task automatic issue(input bit ctr_mode, input block_t msg, input bit load_iv = 0,
                       input block_t new_iv = '0);
    exp_t e;
    in_valid = 1'b1;
    mode_ctr = ctr_mode;
    in_data  = msg;
    iv_load  = load_iv;
    iv       = new_iv;
    if (load_iv) ref_ctr = new_iv;
    if (!keys_ready) n_drop++;
    else begin
      if (ctr_mode) begin
        e.data = encrypt(ref_ctr, cur_key) ^ msg;
        if (ref_ctr[31:0] == '1) n_carry32++;
        if (ref_ctr[63:0] == '1) n_carry64++;
        if (load_iv) n_iv_same++;
        ref_ctr = ref_ctr + 1;
        n_ctr++;
      end else begin
        e.data = encrypt(msg, cur_key);
        n_ecb++;
      end
      if (ctr_mode != last_mode) n_switch++;
      last_mode = ctr_mode;
      e.cyc = cycle;
      sb.push_back(e);
    end
    @(negedge clk);
    in_valid = 1'b0;
    iv_load  = 1'b0;
  endtask

  task automatic load_key(input block_t k);
    int cyc;
    key = k;
    key_load = 1'b1;
    cur_key = k;
    @(negedge clk);
    key_load = 1'b0;
    cyc = 1;
    repeat (2) @(negedge clk);
    cyc += 2;
    // blocks offered now must be dropped
    issue(1'b0, 128'h1);
    cyc++;
    while (!keys_ready && cyc < 40) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 11, $sformatf("keys ready %0d cycles after key_load", cyc));
    n_keyload++;
  endtask

  task automatic set_iv(input block_t v);
    iv = v;
    iv_load = 1'b1;
    ref_ctr = v;
    @(negedge clk);
    iv_load = 1'b0;
  endtask

  task automatic drain();
    repeat (LAT + 5) @(negedge clk);
    check(sb.size() == 0, "blocks lost");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // FIPS-197 appendix B key
    load_key(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c);
    issue(1'b0, 128'h3243f6a8_885a308d_313198a2_e0370734);
    // SP 800-38A F.5.1 CTR-AES128, back to back
    set_iv(128'hf0f1f2f3_f4f5f6f7_f8f9fafb_fcfdfeff);
    issue(1'b1, 128'h6bc1bee2_2e409f96_e93d7e11_7393172a);
    issue(1'b1, 128'hae2d8a57_1e03ac9c_9eb76fac_45af8e51);
    issue(1'b1, 128'h30c81c46_a35ce411_e5fbc119_1a0a52ef);
    issue(1'b1, 128'hf69f2445_df4f9b17_ad2b417b_e66c3710);
    repeat (LAT - 10) @(negedge clk);
    // outputs for those arrive now; compare against the published values too
    fork
      begin
        block_t pub [5] = '{128'h3925841d_02dc09fb_dc118597_196a0b32,
                            128'h874d6191_b620e326_1bef6864_990db6ce,
                            128'h9806f66b_7970fdff_8617187b_b9fffdff,
                            128'h5ae4df3e_dbd5d35e_5b4f0902_0db03eab,
                            128'h1e031dda_2fbe03d1_792170a0_f3009cee};
        int k = 0;
        repeat (30) begin
          @(negedge clk);
          if (out_valid && k < 5) begin
            check(out_data == pub[k], $sformatf("published vector %0d", k));
            k++;
          end
        end
        check(k == 5, "published vectors seen");
      end
    join
    drain();
    // counter crossing a 64-bit boundary, with the iv loaded with the first block
    issue(1'b1, 128'h0, 1'b1, 128'h00000000_00000001_ffffffff_fffffffd);
    for (int i = 0; i < 6; i++) issue(1'b1, {$urandom, $urandom, $urandom, $urandom});
    // long back-to-back mixed stream
    for (int i = 0; i < 400; i++)
      issue(1'($urandom % 2), {$urandom, $urandom, $urandom, $urandom});
    drain();
    // new key, then stream with gaps
    load_key({$urandom, $urandom, $urandom, $urandom});
    set_iv({$urandom, $urandom, $urandom, 32'hfffffff0});
    for (int i = 0; i < 200; i++) begin
      if ($urandom % 4 == 0) @(negedge clk);
      issue(1'($urandom % 2), {$urandom, $urandom, $urandom, $urandom});
    end
    drain();

    $display("mechanisms: ecb=%0d ctr=%0d dropped=%0d mode_switch=%0d carry32=%0d carry64=%0d iv_with_block=%0d key_loads=%0d longest_back_to_back=%0d",
             n_ecb, n_ctr, n_drop, n_switch, n_carry32, n_carry64, n_iv_same, n_keyload, max_run);
    check(n_ecb > 0, "ECB never used");
    check(n_ctr > 0, "CTR never used");
    check(n_drop > 0, "no block dropped before keys ready");
    check(n_switch > 0, "mode never switched");
    check(n_carry32 > 0, "no 32-bit counter carry");
    check(n_carry64 > 0, "no 64-bit counter carry");
    check(n_iv_same > 0, "iv_load never with a block");
    check(n_keyload > 1, "no key change");
    check(max_run >= 400, "no long back-to-back run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
