// aes_pipeline: the fully unrolled AES-128 encryption data path. An input
// register applies the initial AddRoundKey (state ^ rk[0]); ten aes_round
// instances follow, the tenth without MixColumns, each reading its own round
// key from the key memory. Every stage is registered and nothing stalls, so
// one 128-bit block is accepted and one delivered every clock cycle.
// Latency: 1 + 10*STAGES cycles from in_valid to out_valid
// (81 cycles at the default STAGES = 8, the deepest pipelining evaluated by
// the source design, whose throughput is 128 bits times the clock rate).
module aes_pipeline
  import aes_pkg::*;
#(
  parameter int unsigned STAGES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  block_t      in_block,
  input  round_keys_t rk,
  output logic        out_valid,
  output block_t      out_block
);
  logic   v [0:NR];
  block_t st [0:NR];

  // round 0: AddRoundKey of the key itself
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  block_t ark0;
  add_round_key u_ark0 (.s(in_block), .rk(rk[0]), .s_out(ark0));
  pipe_reg #(.W(128)) u_r0 (.clk, .d(ark0), .q(st[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.STAGES(STAGES), .LAST(r == NR)) u_round (
      .clk, .rst_n,
      .in_valid (v[r-1]), .in_state (st[r-1]), .rk (rk[r]),
      .out_valid(v[r]),   .out_state(st[r])
    );
  end

  assign out_valid = v[NR];
  assign out_block = st[NR];
endmodule
