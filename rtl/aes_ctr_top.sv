// aes_ctr_top: AES-128 in counter (CTR) mode at one block per clock, with
// logic-only S-boxes and a fully unrolled, deeply pipelined round data path.
//
// Operation: pulse key_load with the key; the key schedule fills the key
// memory and raises keys_ready 10 cycles later. Pulse iv_load with the
// initial counter block. From then on one block may be offered per cycle on
// in_valid/in_data:
//   mode_ctr = 1: the counter is encrypted, out_data = E_K(counter) ^ in_data,
//                 and the counter advances by one (128-bit increment, carry
//                 through all bits). Encryption and decryption are the same.
//   mode_ctr = 0: ECB, out_data = E_K(in_data), the counter is untouched.
// The mode is sampled per block, so both may be mixed in one stream. When
// iv_load and a CTR block coincide, that block already uses the new iv.
// The message and mode travel beside the cipher pipeline in a delay line and
// meet the key stream in a registered output XOR.
// Latency: 2 + 10*STAGES cycles (82 at STAGES = 8), throughput one block per
// cycle with no stalls. Blocks offered while keys_ready is low are dropped
// (in_ready tells the source); key_load while blocks are in flight corrupts
// them, since the rounds read the key memory directly.
// The 128-bit counter increment is a plain adder; its speed is this design's
// weak point, as in the source design, which leaves a faster adder to
// future work.
module aes_ctr_top
  import aes_pkg::*;
#(
  parameter int unsigned STAGES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
  output logic   keys_ready,
  input  logic   iv_load,
  input  block_t iv,
  input  logic   mode_ctr,
  input  logic   in_valid,
  input  block_t in_data,
  output logic   in_ready,
  output logic   out_valid,
  output block_t out_data
);
  localparam int unsigned DEPTH = 1 + NR * STAGES;  // aes_pipeline latency

  round_keys_t rk;
  key_expansion u_keys (.clk, .rst_n, .key_load, .key, .rk, .ready(keys_ready));

  assign in_ready = keys_ready;

  // counter
  block_t ctr, ctr_use;
  logic   accept;
  assign accept  = in_valid && keys_ready;
  assign ctr_use = iv_load ? iv : ctr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  ctr <= '0;
    else if (accept && mode_ctr) ctr <= ctr_use + 128'd1;
    else if (iv_load)            ctr <= iv;

  // cipher pipeline
  logic   ks_valid;
  block_t ks;
  aes_pipeline #(.STAGES(STAGES)) u_aes (
    .clk, .rst_n,
    .in_valid (accept),
    .in_block (mode_ctr ? ctr_use : in_data),
    .rk,
    .out_valid(ks_valid),
    .out_block(ks)
  );

  // message and mode delay line, DEPTH cycles like the cipher
  typedef struct packed { logic ctr; block_t msg; } side_t;
  side_t dly [DEPTH];
  always_ff @(posedge clk) begin
    dly[0] <= '{ctr: mode_ctr, msg: in_data};
    for (int i = 1; i < DEPTH; i++) dly[i] <= dly[i-1];
  end

  // output XOR
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= ks_valid;
  always_ff @(posedge clk)
    out_data <= ks ^ (dly[DEPTH-1].ctr ? dly[DEPTH-1].msg : '0);

  // a key change must not overtake blocks still in the pipeline
  assert property (@(posedge clk) key_load |-> !in_valid)
    else $error("aes_ctr_top: key_load together with in_valid");
endmodule
