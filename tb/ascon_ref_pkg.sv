// ascon_ref_pkg: reference model of ASCON-128 and of the LLMEE keystream,
// used by the testbenches to compute expected values.
//
// Written independently of the RTL: the S-box is the 32-entry lookup table of
// the ASCON specification applied to each 5-bit column (x0 is the most
// significant bit), and rotations are computed bit by bit.  Only whole 64-bit
// blocks are modelled, plus the final padding block.
package ascon_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef w64_t st_t [5];

  localparam w64_t IV128 = 64'h8040_0c06_0000_0000;

  function automatic logic [4:0] sbox(input logic [4:0] x);
    logic [4:0] t [32] = '{5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
                           5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
                           5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
                           5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17};
    return t[x];
  endfunction

  function automatic w64_t ror(input w64_t w, input int n);
    w64_t r;
    for (int i = 0; i < 64; i++) r[i] = w[(i + n) % 64];
    return r;
  endfunction

  // One round with round index i (0..11 in the 12-round numbering).
  function automatic void round(ref st_t s, input int i);
    logic [4:0] col;
    w64_t o [5];
    s[2][7:0] = s[2][7:0] ^ 8'(((15 - i) << 4) | i);
    for (int b = 0; b < 64; b++) begin
      col = sbox({s[0][b], s[1][b], s[2][b], s[3][b], s[4][b]});
      o[0][b] = col[4]; o[1][b] = col[3]; o[2][b] = col[2];
      o[3][b] = col[1]; o[4][b] = col[0];
    end
    s[0] = o[0] ^ ror(o[0], 19) ^ ror(o[0], 28);
    s[1] = o[1] ^ ror(o[1], 61) ^ ror(o[1], 39);
    s[2] = o[2] ^ ror(o[2],  1) ^ ror(o[2],  6);
    s[3] = o[3] ^ ror(o[3], 10) ^ ror(o[3], 17);
    s[4] = o[4] ^ ror(o[4],  7) ^ ror(o[4], 41);
  endfunction

  function automatic void perm(ref st_t s, input int rounds);
    for (int i = 12 - rounds; i < 12; i++) round(s, i);
  endfunction

  function automatic void init(ref st_t s, input logic [127:0] k, input logic [127:0] n);
    s[0] = IV128; s[1] = k[127:64]; s[2] = k[63:0]; s[3] = n[127:64]; s[4] = n[63:0];
    perm(s, 12);
    s[3] ^= k[127:64];
    s[4] ^= k[63:0];
  endfunction

  // ASCON-128 encryption of n_ad whole AD blocks and n_pt whole PT blocks.
  function automatic void encrypt(input logic [127:0] k, input logic [127:0] n,
                                  input w64_t ad [4], input int n_ad,
                                  input w64_t pt [4], input int n_pt,
                                  output w64_t ct [4], output logic [127:0] tag);
    st_t s;
    init(s, k, n);
    if (n_ad > 0) begin
      for (int j = 0; j < n_ad; j++) begin s[0] ^= ad[j]; perm(s, 6); end
      s[0] ^= 64'h8000_0000_0000_0000;
      perm(s, 6);
    end
    s[4] ^= 64'd1;
    for (int j = 0; j < 4; j++) ct[j] = '0;
    for (int j = 0; j < n_pt; j++) begin
      s[0] ^= pt[j]; ct[j] = s[0]; perm(s, 6);
    end
    s[0] ^= 64'h8000_0000_0000_0000;
    s[1] ^= k[127:64]; s[2] ^= k[63:0];
    perm(s, 12);
    tag = {s[3] ^ k[127:64], s[4] ^ k[63:0]};
  endfunction

  // LLMEE keystream word for one memory word.
  function automatic logic [31:0] llmee_ks(input logic [127:0] k, input logic [31:0] addr,
                                           input logic [31:0] nonce);
    st_t s;
    init(s, k, {nonce, addr, 64'h0});
    return s[0][63:32];
  endfunction

endpackage
