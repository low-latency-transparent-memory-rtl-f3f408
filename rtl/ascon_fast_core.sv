// ascon_fast_core: ASCON "fast core" datapath, one unrolled round per clock.
//
// The 320-bit state register (x0..x4) feeds one ascon_round each cycle.
// Around the round sit the XORs that let a controller run every stage of
// ASCON-128 AEAD with the same hardware:
//   before the round  x0 ^= data_i            (xor_data_i; absorbs AD/PT)
//                     x0  = data_i            (xor_data_i & dec_i; decryption)
//                     x1 ^= key[127:64], x2 ^= key[63:0]   (xor_key_in_i)
//                     x4 ^= 1                 (dom_sep_i; domain separation)
//   after the round   x3 ^= key[127:64], x4 ^= key[63:0]   (xor_key_out_i)
// The round constant of round rc_idx_i (0..11 of the 12-round permutation)
// is added inside the round.  load_i loads IV || K || N.  data_o = x0 ^
// data_i is the ciphertext (or plaintext) block of the current rate word,
// valid combinationally in the cycle the block is absorbed.  state_o is the
// registered state; after finalization {x3, x4} is the tag.
//
// Timing: load_i takes one cycle, every round_en_i cycle is one round.  The
// caller sequences rounds and stage controls; this block has no counter.
// The XOR placement follows the fast-core datapath of the design; the choice
// of a replace (not XOR) on x0 for decryption is this implementation's.
module ascon_fast_core
  import llmee_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_i,         // load IV || key_i || nonce_i
  input  logic          round_en_i,     // perform one round this cycle
  input  logic [3:0]    rc_idx_i,       // round index for the constant
  input  logic          xor_data_i,     // absorb data_i into x0
  input  logic          dec_i,          // with xor_data_i: x0 = data_i
  input  logic          xor_key_in_i,   // key into x1, x2 before the round
  input  logic          dom_sep_i,      // x4 ^= 1 before the round
  input  logic          xor_key_out_i,  // key into x3, x4 after the round
  input  logic [127:0]  key_i,
  input  logic [127:0]  nonce_i,
  input  ascon_word_t   data_i,
  output ascon_word_t   data_o,
  output ascon_state_t  state_o
);

  ascon_state_t state_q, pre, post;

  always_comb begin
    pre = state_q;
    if (xor_data_i)   pre[0] = dec_i ? data_i : (state_q[0] ^ data_i);
    if (xor_key_in_i) begin
      pre[1] = pre[1] ^ key_i[127:64];
      pre[2] = pre[2] ^ key_i[63:0];
    end
    if (dom_sep_i)    pre[4] = pre[4] ^ 64'd1;
  end

  ascon_state_t rnd;
  ascon_round u_round (
    .state_i (pre),
    .rc_i    (ascon_rc(rc_idx_i)),
    .state_o (rnd)
  );

  always_comb begin
    post = rnd;
    if (xor_key_out_i) begin
      post[3] = rnd[3] ^ key_i[127:64];
      post[4] = rnd[4] ^ key_i[63:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state_q <= '0;
    else if (load_i)     state_q <= {nonce_i[63:0], nonce_i[127:64],
                                     key_i[63:0], key_i[127:64], ASCON128_IV};
    else if (round_en_i) state_q <= post;
  end

  assign data_o  = state_q[0] ^ data_i;
  assign state_o = state_q;

  // A load and a round in the same cycle would drop the round.
  assert property (@(posedge clk) disable iff (!rst_n) !(load_i && round_en_i));

endmodule
