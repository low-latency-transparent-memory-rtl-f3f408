// ascon_fast_core_tb: drives the fast core through complete ASCON-128
// authenticated encryptions and decryptions and compares ciphertext and tag
// with the reference model; also checks the known-answer vector for key =
// nonce = 00..0F with empty AD and plaintext (tag E355159F292911F794CB1432A0103A8A).
// The core does one round per clock, so an encryption of s AD blocks and t
// plaintext blocks must take 1 + 12 + 6(s+1 if s>0) + 6t + 12 cycles; the
// testbench counts them.
module ascon_fast_core_tb;
  import llmee_pkg::*;
  import ascon_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, round_en, xor_data, dec, xor_key_in, dom_sep, xor_key_out;
  logic [3:0] rc_idx;
  logic [127:0] key, nonce;
  ascon_word_t data_i, data_o;
  ascon_state_t st;
  int checks = 0, failures = 0, cycles;

  always #5 clk = ~clk;

  ascon_fast_core dut (
    .clk, .rst_n, .load_i(load), .round_en_i(round_en), .rc_idx_i(rc_idx),
    .xor_data_i(xor_data), .dec_i(dec), .xor_key_in_i(xor_key_in), .dom_sep_i(dom_sep),
    .xor_key_out_i(xor_key_out), .key_i(key), .nonce_i(nonce), .data_i(data_i),
    .data_o(data_o), .state_o(st)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    load = 0; round_en = 0; xor_data = 0; dec = 0; xor_key_in = 0;
    dom_sep = 0; xor_key_out = 0; rc_idx = 0; data_i = '0;
  endtask

  // one clock with the given controls, then clear them
  task automatic step();
    @(posedge clk); cycles++; #1; idle();
  endtask

  // rounds first..11; the first round may carry pre-round controls already set
  task automatic rounds(input int first, input bit key_out);
    for (int i = first; i < 12; i++) begin
      round_en = 1; rc_idx = 4'(i);
      xor_key_out = key_out && (i == 11);
      step();
    end
  endtask

  // Full AEAD on the core. dec_mode: pt holds the ciphertext; out returns
  // the plaintext.
  task automatic run(input logic [127:0] k, input logic [127:0] n,
                     input w64_t ad [4], input int n_ad,
                     input w64_t pt [4], input int n_pt, input bit dec_mode,
                     output w64_t out [4], output logic [127:0] tag);
    bit first_pt = 1;
    key = k; nonce = n; cycles = 0;
    for (int j = 0; j < 4; j++) out[j] = '0;
    load = 1; step();
    rounds(0, 1);
    for (int j = 0; j < n_ad + (n_ad > 0 ? 1 : 0); j++) begin
      xor_data = 1;
      data_i = (j < n_ad) ? ad[j] : 64'h8000_0000_0000_0000;
      rounds(6, 0);
    end
    for (int j = 0; j < n_pt; j++) begin
      xor_data = 1; dec = dec_mode; data_i = pt[j];
      dom_sep = first_pt; first_pt = 0;
      #1 out[j] = data_o;
      rounds(6, 0);
    end
    xor_data = 1; data_i = 64'h8000_0000_0000_0000; xor_key_in = 1; dom_sep = first_pt;
    rounds(0, 1);
    tag = {st[3], st[4]};
  endtask

  initial begin
    w64_t ad [4], pt [4], ct [4], got [4], back [4];
    logic [127:0] k, n, tag_ref, tag_got, tag_dec;
    idle();
    key = '0; nonce = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // known-answer vector
    k = 128'h000102030405060708090A0B0C0D0E0F; n = k;
    run(k, n, ad, 0, pt, 0, 0, got, tag_got);
    checks++;
    if (tag_got !== 128'hE355159F292911F794CB1432A0103A8A) begin
      failures++; $display("KAT tag %h", tag_got);
    end
    checks++;
    if (cycles != 1 + 12 + 12) begin failures++; $display("KAT cycles %0d", cycles); end

    for (int t = 0; t < 12; t++) begin
      automatic int n_ad = t % 3;
      automatic int n_pt = (t / 3) % 4 + 1;
      k = {$urandom, $urandom, $urandom, $urandom};
      n = {$urandom, $urandom, $urandom, $urandom};
      for (int j = 0; j < 4; j++) begin
        ad[j] = {$urandom, $urandom}; pt[j] = {$urandom, $urandom};
      end
      encrypt(k, n, ad, n_ad, pt, n_pt, ct, tag_ref);
      run(k, n, ad, n_ad, pt, n_pt, 0, got, tag_got);
      for (int j = 0; j < n_pt; j++) begin
        checks++;
        if (got[j] !== ct[j]) begin failures++; $display("t%0d ct%0d %h want %h", t, j, got[j], ct[j]); end
      end
      checks++;
      if (tag_got !== tag_ref) begin failures++; $display("t%0d tag %h want %h", t, tag_got, tag_ref); end
      checks++;
      if (cycles != 1 + 12 + (n_ad > 0 ? 6 * (n_ad + 1) : 0) + 6 * n_pt + 12) begin
        failures++; $display("t%0d cycles %0d", t, cycles);
      end
      // decryption restores the plaintext and the same tag
      run(k, n, ad, n_ad, ct, n_pt, 1, back, tag_dec);
      for (int j = 0; j < n_pt; j++) begin
        checks++;
        if (back[j] !== pt[j]) begin failures++; $display("t%0d pt%0d %h want %h", t, j, back[j], pt[j]); end
      end
      checks++;
      if (tag_dec !== tag_ref) begin failures++; $display("t%0d dec tag %h", t, tag_dec); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
