// llmee_pkg: types and constants shared by the LLMEE memory encryption engine.
//
// The engine encrypts every 32-bit CPU word with the ASCON-128 initialization
// step used as a tweakable keystream generator.  This package holds the ASCON
// state type, the ASCON-128 initialization vector, the round-constant
// function and the enum types of the controller state machines.
//
// The IV value follows from the ASCON-128 parameters the design uses
// (key 128, rate 64, a = 12, b = 6 rounds) encoded as k||r||a||b||0* as in the
// ASCON specification.  The round constants are c_i = ((15-i) << 4) | i for
// round i of the 12-round permutation, which reproduces the constant table
// f0, e1, d2, ... 4b.
package llmee_pkg;

  // ASCON-128 parameters
  localparam int unsigned ASCON_KEY_W   = 128;
  localparam int unsigned ASCON_RATE_W  = 64;
  localparam int unsigned ASCON_A_RNDS  = 12;
  localparam int unsigned ASCON_B_RNDS  = 6;
  localparam logic [63:0] ASCON128_IV   = {8'(ASCON_KEY_W), 8'(ASCON_RATE_W),
                                           8'(ASCON_A_RNDS), 8'(ASCON_B_RNDS), 32'h0};

  // 320-bit state as five 64-bit words; index 0 is x0 (the rate word).
  typedef logic [63:0] ascon_word_t;
  typedef ascon_word_t [4:0] ascon_state_t;

  // Round constant of round i (0..11) of the 12-round permutation p^a.
  // The b-round permutation uses rounds 12-b .. 11.
  function automatic logic [7:0] ascon_rc(input logic [3:0] i);
    logic [3:0] hi;
    hi = 4'hF - i;
    return {hi, i};
  endfunction

  // Cipher control states (IDLE, ENCRYPTING, DONE).
  typedef enum logic [1:0] {
    CC_IDLE,
    CC_ENCRYPTING,
    CC_DONE
  } cc_state_e;

  // Write transaction states (write FSM).
  typedef enum logic [3:0] {
    W_IDLE,
    W_ASCON_IDLE,
    W_HALT,
    W_START_ASCON,
    W_ENCRYPTING,
    W_WRITE_DATA,
    W_CHECK_WRITE,
    W_RESPONSE,
    W_DONE
  } wr_state_e;

  // Read transaction states (read FSM).
  typedef enum logic [3:0] {
    R_IDLE,
    R_ASCON_IDLE,
    R_HALT,
    R_READ_DATA,
    R_CHECK_READ,
    R_START_ASCON,
    R_DECRYPTING,
    R_RESPONSE,
    R_TRANSFER
  } rd_state_e;

  // Owner of the shared cipher and memory port.
  typedef enum logic [1:0] {
    OWN_NONE,
    OWN_WR,
    OWN_RD
  } owner_e;

  // AXI master states.
  typedef enum logic [2:0] {
    M_IDLE,
    M_WRITE,
    M_WRESP,
    M_READ,
    M_RDATA
  } mst_state_e;

  // AXI response codes
  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_SLVERR = 2'b10;

endpackage
