// ascon_round: one ASCON round p = pL o pS o pC on the 320-bit state.
//
// Purely combinational.  pC adds the 8-bit round constant to the low byte of
// x2; pS applies the 5-bit S-box to each of the 64 bit slices in bitsliced
// form (xor in, and-not layer, xor out, invert x2); pL XORs each word with two
// right-rotations of itself: x0 by 19/28, x1 by 61/39, x2 by 1/6, x3 by
// 10/17, x4 by 7/41.  The fast core instantiates one of these and applies it
// once per clock.
//
// Interface: state_i (x0..x4), rc_i (round constant), state_o.  No clock.
module ascon_round
  import llmee_pkg::*;
(
  input  ascon_state_t state_i,
  input  logic [7:0]   rc_i,
  output ascon_state_t state_o
);

  function automatic ascon_word_t rotr(input ascon_word_t w, input int unsigned n);
    return (w >> n) | (w << (64 - n));
  endfunction

  ascon_word_t a0, a1, a2, a3, a4;   // after constant addition and input xors
  ascon_word_t t0, t1, t2, t3, t4;   // and-not layer
  ascon_word_t s0, s1, s2, s3, s4;   // after the S-box

  always_comb begin
    // pC
    a0 = state_i[0];
    a1 = state_i[1];
    a2 = state_i[2] ^ {56'h0, rc_i};
    a3 = state_i[3];
    a4 = state_i[4];
    // pS, input xors
    a0 = a0 ^ a4;
    a4 = a4 ^ a3;
    a2 = a2 ^ a1;
    // and-not layer
    t0 = ~a0 & a1;
    t1 = ~a1 & a2;
    t2 = ~a2 & a3;
    t3 = ~a3 & a4;
    t4 = ~a4 & a0;
    s0 = a0 ^ t1;
    s1 = a1 ^ t2;
    s2 = a2 ^ t3;
    s3 = a3 ^ t4;
    s4 = a4 ^ t0;
    // output xors
    s1 = s1 ^ s0;
    s0 = s0 ^ s4;
    s3 = s3 ^ s2;
    s2 = ~s2;
    // pL
    state_o[0] = s0 ^ rotr(s0, 19) ^ rotr(s0, 28);
    state_o[1] = s1 ^ rotr(s1, 61) ^ rotr(s1, 39);
    state_o[2] = s2 ^ rotr(s2,  1) ^ rotr(s2,  6);
    state_o[3] = s3 ^ rotr(s3, 10) ^ rotr(s3, 17);
    state_o[4] = s4 ^ rotr(s4,  7) ^ rotr(s4, 41);
  end

endmodule
