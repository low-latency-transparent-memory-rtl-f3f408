// cipher_control: runs the ASCON fast core as a tweakable keystream generator.
//
// A three-state machine: IDLE (cipher free), ENCRYPTING (rounds running) and
// DONE (result valid).  On start_i in IDLE the fast core is loaded with
// IV || key || N, where the 128-bit nonce N carries the 64-bit tweak
// {nonce_i, addr_i} in its upper half and zeros below.  Twelve rounds of the
// initialization permutation follow, the last one with the key XORed into
// x3/x4 as ASCON's initialization prescribes.  The upper 32 bits of x0 are
// then the keystream; data_o = data_i ^ keystream.  Encryption and decryption
// are the same operation, so writes and reads share this block.  No
// associated-data, plaintext or finalization stage is run and no tag is made.
//
// Timing: start_i is sampled in IDLE; done_o is high for one cycle, 13 cycles
// after the start cycle (1 load + 12 rounds).  data_o stays valid from done_o
// until the next start.  busy_o is high from the cycle after start until
// done_o.  data_i is captured at start, addr_i and nonce_i are loaded into the
// state at start; key_i must stay stable until done_o (it comes from the
// constant key register).
module cipher_control
  import llmee_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [127:0] key_i,
  input  logic [31:0]  addr_i,    // tweak: DRAM address of the word
  input  logic [31:0]  nonce_i,   // tweak: per-write random nonce
  input  logic [31:0]  data_i,    // plaintext (write) or ciphertext (read)
  output logic         busy_o,
  output logic         done_o,
  output logic [31:0]  data_o
);

  cc_state_e    state_q;
  logic [3:0]   rnd_q;
  logic [31:0]  data_q;
  ascon_state_t core_state;
  ascon_word_t  unused_data;

  logic load, round_en, last_round;
  assign load       = (state_q == CC_IDLE) && start_i;
  assign round_en   = (state_q == CC_ENCRYPTING);
  assign last_round = round_en && (rnd_q == 4'(ASCON_A_RNDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= CC_IDLE;
      rnd_q   <= '0;
      data_q  <= '0;
    end else begin
      unique case (state_q)
        CC_IDLE: if (start_i) begin
          state_q <= CC_ENCRYPTING;
          rnd_q   <= '0;
          data_q  <= data_i;
        end
        CC_ENCRYPTING: begin
          rnd_q <= rnd_q + 4'd1;
          if (last_round) state_q <= CC_DONE;
        end
        CC_DONE: state_q <= CC_IDLE;
        default: state_q <= CC_IDLE;
      endcase
    end
  end

  ascon_fast_core u_core (
    .clk           (clk),
    .rst_n         (rst_n),
    .load_i        (load),
    .round_en_i    (round_en),
    .rc_idx_i      (rnd_q),
    .xor_data_i    (1'b0),
    .dec_i         (1'b0),
    .xor_key_in_i  (1'b0),
    .dom_sep_i     (1'b0),
    .xor_key_out_i (last_round),
    .key_i         (key_i),
    .nonce_i       ({nonce_i, addr_i, 64'h0}),
    .data_i        ('0),
    .data_o        (unused_data),
    .state_o       (core_state)
  );

  assign busy_o = (state_q != CC_IDLE);
  assign done_o = (state_q == CC_DONE);
  assign data_o = data_q ^ core_state[0][63:32];

  assert property (@(posedge clk) disable iff (!rst_n) start_i |-> !busy_o);

endmodule
