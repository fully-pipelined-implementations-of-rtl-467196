// key_expansion: AES-128 key schedule with its key memory.
// The schedule is not unrolled: after key_load it produces one round key per
// clock cycle (RotWord, SubWord through four logic-only S-boxes, Rcon, and the
// XOR chain over the four words) and writes it into an eleven-entry key
// memory rk[0..10]. ready rises 10 cycles after key_load and stays high until
// the next key_load; the pipeline rounds read all eleven keys at once.
// Round keys use the same byte order as the state (byte 0 in bits [127:120]).
// Reset clears ready; the memory itself is not reset.
module key_expansion
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key,
  output round_keys_t rk,
  output logic        ready
);
  round_keys_t mem;
  block_t      cur, nxt;
  byte_t       rcon;
  logic [3:0]  idx;     // index of the next key to write, 1..10
  logic        busy;
  logic [31:0] rot, sub;

  // RotWord of the last word, then SubWord
  assign rot = {cur[23:0], cur[31:24]};
  for (genvar b = 0; b < 4; b++) begin : g_sbox
    sbox u_sbox (.s(rot[8*b +: 8]), .s_out(sub[8*b +: 8]));
  end

  always_comb begin
    nxt[127:96] = cur[127:96] ^ sub ^ {rcon, 24'h0};
    nxt[95:64]  = cur[95:64]  ^ nxt[127:96];
    nxt[63:32]  = cur[63:32]  ^ nxt[95:64];
    nxt[31:0]   = cur[31:0]   ^ nxt[63:32];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      idx   <= 4'd0;
      rcon  <= 8'h01;
    end else if (key_load) begin
      busy  <= 1'b1;
      ready <= 1'b0;
      idx   <= 4'd1;
      rcon  <= 8'h01;
    end else if (busy) begin
      idx   <= idx + 4'd1;
      rcon  <= {rcon[6:0], 1'b0} ^ (rcon[7] ? 8'h1b : 8'h00);
      if (idx == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end

  always_ff @(posedge clk)
    if (key_load) begin
      cur    <= key;
      mem[0] <= key;
    end else if (busy) begin
      cur      <= nxt;
      mem[idx] <= nxt;
    end

  assign rk = mem;
endmodule
