// tweak_select: the address selector, nonce selector and concat of the LLMEE
// datapath.
//
// sel_i = 0 (write): the cipher tweak is {rand_nonce_i, waddr_i}, the cipher
// input is the CPU write data, and the memory word written is
// {nonce, ciphertext}: ciphertext in bits 31:0 (the lower DRAM address),
// nonce in bits 63:32.
// sel_i = 1 (read): the tweak is {previous nonce, raddr_i}, where the
// previous nonce is bits 63:32 of the word read from memory, and the cipher
// input is the stored ciphertext, bits 31:0 of that word.
// addr_o is also the address the memory master uses.
//
// Purely combinational.  The word layout follows the memory picture of the
// design (data word first, nonce word after it).
module tweak_select (
  input  logic        sel_i,
  input  logic [31:0] waddr_i,
  input  logic [31:0] raddr_i,
  input  logic [31:0] rand_nonce_i,
  input  logic [31:0] cpu_wdata_i,   // plaintext from the CPU
  input  logic [63:0] rd_word_i,     // {nonce, ciphertext} read from memory
  input  logic [31:0] cipher_out_i,  // output of the cipher
  output logic [31:0] addr_o,        // "counter": tweak address / memory address
  output logic [31:0] nonce_o,       // tweak nonce
  output logic [31:0] cipher_in_o,   // data into the cipher
  output logic [63:0] wr_word_o      // {nonce, ciphertext} to memory
);

  logic [31:0] prev_nonce;
  assign prev_nonce = rd_word_i[63:32];

  always_comb begin
    addr_o      = sel_i ? raddr_i         : waddr_i;
    nonce_o     = sel_i ? prev_nonce      : rand_nonce_i;
    cipher_in_o = sel_i ? rd_word_i[31:0] : cpu_wdata_i;
  end

  assign wr_word_o = {nonce_o, cipher_out_i};

endmodule
