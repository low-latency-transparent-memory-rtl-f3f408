// control_logic: address translation, key, nonce generation and read/write
// selection for the LLMEE.
//
// Address translation: the engine occupies a CPU window starting at
// LLMEE_BASE.  Each 32-bit CPU word is stored in DRAM as a 64-bit pair
// {nonce, ciphertext}, so CPU offset o maps to DRAM address
// DDR_BASE + 2*o (CPU 0x0 -> DRAM 0x0, CPU 0x4 -> DRAM 0x8).  The base is
// subtracted, the offset doubled, the memory base added; all modulo 2^32.
//
// Key: a 128-bit register loaded with the KEY parameter at reset.
// Nonce: a 32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1, a maximal-length
// polynomial) that steps once per completed write (nonce_next_i), so every
// write uses a fresh nonce.  With RNG_EN = 0 the nonce is the constant
// DEFAULT_NONCE, the test configuration of the design.
// Selection: a small arbiter gives the shared cipher and memory port to one
// pending transaction at a time (wr_grant_o / rd_grant_o), alternating when a
// read and a write request together; sel_o is 1 while a read owns the path
// and steers the address and nonce selectors.  release_i frees the path.
//
// Timing: the grant is registered and appears the cycle after the request;
// the address outputs are combinational.  The LFSR, the arbiter and the
// alternation rule are this implementation's choices.
module control_logic
  import llmee_pkg::*;
#(
  parameter logic [31:0]  LLMEE_BASE    = 32'h4000_0000,
  parameter logic [31:0]  DDR_BASE      = 32'h1000_0000,
  parameter logic [127:0] KEY           = 128'h0001_0203_0405_0607_0809_0A0B_0C0D_0E0F,
  parameter bit           RNG_EN        = 1'b1,
  parameter logic [31:0]  NONCE_SEED    = 32'hACE1_2468,
  parameter logic [31:0]  DEFAULT_NONCE = 32'h0000_0001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_req_i,      // a write is pending at the slave
  input  logic         rd_req_i,      // a read is pending at the slave
  input  logic         release_i,     // current owner has finished
  input  logic         nonce_next_i,  // step the nonce generator
  input  logic [31:0]  waddr_i,       // CPU write address
  input  logic [31:0]  raddr_i,       // CPU read address
  output logic [31:0]  waddr_o,       // DRAM write address (Waddr)
  output logic [31:0]  raddr_o,       // DRAM read address (Raddr)
  output logic [127:0] key_o,
  output logic [31:0]  rand_nonce_o,
  output logic         wr_grant_o,
  output logic         rd_grant_o,
  output logic         sel_o          // 0: write path, 1: read path
);

  localparam logic [31:0] LFSR_TAPS = 32'h8020_0003;

  function automatic logic [31:0] to_ddr(input logic [31:0] cpu_addr);
    logic [31:0] off;
    off = cpu_addr - LLMEE_BASE;
    return DDR_BASE + {off[30:0], 1'b0};
  endfunction

  assign waddr_o = to_ddr(waddr_i);
  assign raddr_o = to_ddr(raddr_i);

  logic [127:0] key_q;
  logic [31:0]  lfsr_q;
  owner_e       owner_q;
  logic         last_wr_q;   // the previous grant went to a write

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q     <= KEY;
      lfsr_q    <= NONCE_SEED;
      owner_q   <= OWN_NONE;
      last_wr_q <= 1'b0;
    end else begin
      if (nonce_next_i)
        lfsr_q <= (lfsr_q >> 1) ^ (lfsr_q[0] ? LFSR_TAPS : 32'h0);
      if (owner_q != OWN_NONE) begin
        if (release_i) owner_q <= OWN_NONE;
      end else if (wr_req_i && (!rd_req_i || !last_wr_q)) begin
        owner_q   <= OWN_WR;
        last_wr_q <= 1'b1;
      end else if (rd_req_i) begin
        owner_q   <= OWN_RD;
        last_wr_q <= 1'b0;
      end
    end
  end

  assign key_o        = key_q;
  assign rand_nonce_o = RNG_EN ? lfsr_q : DEFAULT_NONCE;
  assign wr_grant_o   = (owner_q == OWN_WR);
  assign rd_grant_o   = (owner_q == OWN_RD);
  assign sel_o        = (owner_q == OWN_RD);

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_grant_o && rd_grant_o));

endmodule
