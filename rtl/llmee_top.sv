// llmee_top: Low-latency Lightweight Memory Encryption Engine (LLMEE).
//
// The engine sits between a CPU and its memory and encrypts every 32-bit word
// the CPU writes into its address window, transparently to software.  Each
// write draws a fresh 32-bit nonce; the ASCON-128 initialization (12 rounds)
// over IV || key || {nonce, DRAM address} gives a 32-bit keystream that is
// XORed with the data, and the pair {nonce, ciphertext} is stored as one
// 64-bit memory word at DDR_BASE + 2 * (CPU address - LLMEE_BASE).  A read
// fetches that pair, recomputes the keystream from the stored nonce and the
// address and returns the plaintext.
//
// Blocks: axi_lite_slave (CPU port, 32-bit AXI4-Lite), control_logic (address
// translation, key, nonce generator, read/write arbitration), tweak_select
// (address/nonce selectors and concat), cipher_control (ASCON fast core
// sequencer), txn_ctrl (write and read FSMs) and axi_full_master (64-bit AXI4
// memory port, single beats).
//
// Ports: s00_axi_* is the CPU slave port, m00_axi_* the memory master port,
// one clock and one active-low reset for both.  txn_wr_done / txn_rd_done
// pulse when a CPU write / read completes; error is high after a memory
// response that was not OKAY (also returned to the CPU as SLVERR).
//
// Timing: with a memory that answers at once, a CPU write completes in about
// 22 cycles and a read in about 22 cycles; the cipher takes 13 of them.
module llmee_top
  import llmee_pkg::*;
#(
  parameter logic [31:0]  LLMEE_BASE    = 32'h4000_0000,
  parameter logic [31:0]  DDR_BASE      = 32'h1000_0000,
  parameter logic [127:0] KEY           = 128'h0001_0203_0405_0607_0809_0A0B_0C0D_0E0F,
  parameter bit           RNG_EN        = 1'b1,
  parameter logic [31:0]  NONCE_SEED    = 32'hACE1_2468,
  parameter logic [31:0]  DEFAULT_NONCE = 32'h0000_0001,
  parameter int unsigned  M_ID_W        = 1,
  parameter int unsigned  M_USER_W      = 1
) (
  input  logic          aclk,
  input  logic          aresetn,
  // CPU side: AXI4-Lite slave, 32-bit
  input  logic [31:0]   s00_axi_awaddr,
  input  logic [2:0]    s00_axi_awprot,
  input  logic          s00_axi_awvalid,
  output logic          s00_axi_awready,
  input  logic [31:0]   s00_axi_wdata,
  input  logic [3:0]    s00_axi_wstrb,
  input  logic          s00_axi_wvalid,
  output logic          s00_axi_wready,
  output logic [1:0]    s00_axi_bresp,
  output logic          s00_axi_bvalid,
  input  logic          s00_axi_bready,
  input  logic [31:0]   s00_axi_araddr,
  input  logic [2:0]    s00_axi_arprot,
  input  logic          s00_axi_arvalid,
  output logic          s00_axi_arready,
  output logic [31:0]   s00_axi_rdata,
  output logic [1:0]    s00_axi_rresp,
  output logic          s00_axi_rvalid,
  input  logic          s00_axi_rready,
  // memory side: AXI4 master, 64-bit
  output logic [M_ID_W-1:0]   m00_axi_awid,
  output logic [31:0]         m00_axi_awaddr,
  output logic [7:0]          m00_axi_awlen,
  output logic [2:0]          m00_axi_awsize,
  output logic [1:0]          m00_axi_awburst,
  output logic                m00_axi_awlock,
  output logic [3:0]          m00_axi_awcache,
  output logic [2:0]          m00_axi_awprot,
  output logic [3:0]          m00_axi_awqos,
  output logic [M_USER_W-1:0] m00_axi_awuser,
  output logic                m00_axi_awvalid,
  input  logic                m00_axi_awready,
  output logic [63:0]         m00_axi_wdata,
  output logic [7:0]          m00_axi_wstrb,
  output logic                m00_axi_wlast,
  output logic [M_USER_W-1:0] m00_axi_wuser,
  output logic                m00_axi_wvalid,
  input  logic                m00_axi_wready,
  input  logic [M_ID_W-1:0]   m00_axi_bid,
  input  logic [1:0]          m00_axi_bresp,
  input  logic [M_USER_W-1:0] m00_axi_buser,
  input  logic                m00_axi_bvalid,
  output logic                m00_axi_bready,
  output logic [M_ID_W-1:0]   m00_axi_arid,
  output logic [31:0]         m00_axi_araddr,
  output logic [7:0]          m00_axi_arlen,
  output logic [2:0]          m00_axi_arsize,
  output logic [1:0]          m00_axi_arburst,
  output logic                m00_axi_arlock,
  output logic [3:0]          m00_axi_arcache,
  output logic [2:0]          m00_axi_arprot,
  output logic [3:0]          m00_axi_arqos,
  output logic [M_USER_W-1:0] m00_axi_aruser,
  output logic                m00_axi_arvalid,
  input  logic                m00_axi_arready,
  input  logic [M_ID_W-1:0]   m00_axi_rid,
  input  logic [63:0]         m00_axi_rdata,
  input  logic [1:0]          m00_axi_rresp,
  input  logic                m00_axi_rlast,
  input  logic [M_USER_W-1:0] m00_axi_ruser,
  input  logic                m00_axi_rvalid,
  output logic                m00_axi_rready,
  // status
  output logic                txn_wr_done,
  output logic                txn_rd_done,
  output logic                error,
  output logic                wr_halt,     // a write attempt was halted
  output logic                rd_halt,     // a read attempt was halted
  output logic [3:0]          wr_fsm_state, // write FSM state (wr_state_e)
  output logic [3:0]          rd_fsm_state  // read FSM state (rd_state_e)
);

  // slave <-> engine
  logic        wr_req, rd_req, b_hs, r_hs;
  logic [31:0] cpu_waddr, cpu_wdata, cpu_raddr;
  // control logic
  logic [31:0]  ddr_waddr, ddr_raddr, rand_nonce;
  logic [127:0] key;
  logic         wr_grant, rd_grant, sel;
  // selectors
  logic [31:0] tweak_addr, tweak_nonce, cipher_in, cipher_out;
  logic [63:0] wr_word, rd_word;
  // cipher
  logic cc_start, cc_busy, cc_done;
  // master
  logic m_wr_start, m_rd_start, m_done, m_err, m_busy;
  // transaction control
  logic wr_resp, rd_resp, release_path, nonce_next;
  wr_state_e wr_state;
  rd_state_e rd_state;

  axi_lite_slave #(.ADDR_W(32), .DATA_W(32)) u_slave (
    .clk (aclk), .rst_n (aresetn),
    .s_axi_awaddr (s00_axi_awaddr), .s_axi_awprot (s00_axi_awprot),
    .s_axi_awvalid(s00_axi_awvalid), .s_axi_awready(s00_axi_awready),
    .s_axi_wdata  (s00_axi_wdata),  .s_axi_wstrb  (s00_axi_wstrb),
    .s_axi_wvalid (s00_axi_wvalid), .s_axi_wready (s00_axi_wready),
    .s_axi_bresp  (s00_axi_bresp),  .s_axi_bvalid (s00_axi_bvalid),
    .s_axi_bready (s00_axi_bready),
    .s_axi_araddr (s00_axi_araddr), .s_axi_arprot (s00_axi_arprot),
    .s_axi_arvalid(s00_axi_arvalid), .s_axi_arready(s00_axi_arready),
    .s_axi_rdata  (s00_axi_rdata),  .s_axi_rresp  (s00_axi_rresp),
    .s_axi_rvalid (s00_axi_rvalid), .s_axi_rready (s00_axi_rready),
    .wr_req_o (wr_req), .waddr_o (cpu_waddr), .wdata_o (cpu_wdata),
    .wr_resp_i (wr_resp), .wr_err_i (m_err),
    .rd_req_o (rd_req), .raddr_o (cpu_raddr),
    .rd_resp_i (rd_resp), .rd_err_i (m_err), .rd_data_i (cipher_out),
    .b_hs_o (b_hs), .r_hs_o (r_hs)
  );

  control_logic #(
    .LLMEE_BASE (LLMEE_BASE), .DDR_BASE (DDR_BASE), .KEY (KEY),
    .RNG_EN (RNG_EN), .NONCE_SEED (NONCE_SEED), .DEFAULT_NONCE (DEFAULT_NONCE)
  ) u_ctrl (
    .clk (aclk), .rst_n (aresetn),
    .wr_req_i (wr_req), .rd_req_i (rd_req),
    .release_i (release_path), .nonce_next_i (nonce_next),
    .waddr_i (cpu_waddr), .raddr_i (cpu_raddr),
    .waddr_o (ddr_waddr), .raddr_o (ddr_raddr),
    .key_o (key), .rand_nonce_o (rand_nonce),
    .wr_grant_o (wr_grant), .rd_grant_o (rd_grant), .sel_o (sel)
  );

  tweak_select u_sel (
    .sel_i (sel), .waddr_i (ddr_waddr), .raddr_i (ddr_raddr),
    .rand_nonce_i (rand_nonce), .cpu_wdata_i (cpu_wdata),
    .rd_word_i (rd_word), .cipher_out_i (cipher_out),
    .addr_o (tweak_addr), .nonce_o (tweak_nonce),
    .cipher_in_o (cipher_in), .wr_word_o (wr_word)
  );

  cipher_control u_cipher (
    .clk (aclk), .rst_n (aresetn),
    .start_i (cc_start), .key_i (key),
    .addr_i (tweak_addr), .nonce_i (tweak_nonce), .data_i (cipher_in),
    .busy_o (cc_busy), .done_o (cc_done), .data_o (cipher_out)
  );

  txn_ctrl u_txn (
    .clk (aclk), .rst_n (aresetn),
    .wr_req_i (wr_req), .rd_req_i (rd_req),
    .wr_grant_i (wr_grant), .rd_grant_i (rd_grant),
    .cc_done_i (cc_done), .m_done_i (m_done),
    .b_hs_i (b_hs), .r_hs_i (r_hs),
    .cc_start_o (cc_start), .m_wr_start_o (m_wr_start), .m_rd_start_o (m_rd_start),
    .wr_resp_o (wr_resp), .rd_resp_o (rd_resp),
    .release_o (release_path), .nonce_next_o (nonce_next),
    .wr_halt_o (wr_halt), .rd_halt_o (rd_halt),
    .wr_state_o (wr_state), .rd_state_o (rd_state)
  );

  axi_full_master #(
    .ADDR_W (32), .DATA_W (64), .ID_W (M_ID_W), .USER_W (M_USER_W), .BURST_LEN (1)
  ) u_master (
    .clk (aclk), .rst_n (aresetn),
    .wr_start_i (m_wr_start), .rd_start_i (m_rd_start),
    .addr_i (tweak_addr), .wdata_i (wr_word), .rdata_o (rd_word),
    .txn_done_o (m_done), .error_o (m_err), .busy_o (m_busy),
    .m_axi_awid (m00_axi_awid), .m_axi_awaddr (m00_axi_awaddr),
    .m_axi_awlen (m00_axi_awlen), .m_axi_awsize (m00_axi_awsize),
    .m_axi_awburst (m00_axi_awburst), .m_axi_awlock (m00_axi_awlock),
    .m_axi_awcache (m00_axi_awcache), .m_axi_awprot (m00_axi_awprot),
    .m_axi_awqos (m00_axi_awqos), .m_axi_awuser (m00_axi_awuser),
    .m_axi_awvalid (m00_axi_awvalid), .m_axi_awready (m00_axi_awready),
    .m_axi_wdata (m00_axi_wdata), .m_axi_wstrb (m00_axi_wstrb),
    .m_axi_wlast (m00_axi_wlast), .m_axi_wuser (m00_axi_wuser),
    .m_axi_wvalid (m00_axi_wvalid), .m_axi_wready (m00_axi_wready),
    .m_axi_bid (m00_axi_bid), .m_axi_bresp (m00_axi_bresp),
    .m_axi_buser (m00_axi_buser), .m_axi_bvalid (m00_axi_bvalid),
    .m_axi_bready (m00_axi_bready),
    .m_axi_arid (m00_axi_arid), .m_axi_araddr (m00_axi_araddr),
    .m_axi_arlen (m00_axi_arlen), .m_axi_arsize (m00_axi_arsize),
    .m_axi_arburst (m00_axi_arburst), .m_axi_arlock (m00_axi_arlock),
    .m_axi_arcache (m00_axi_arcache), .m_axi_arprot (m00_axi_arprot),
    .m_axi_arqos (m00_axi_arqos), .m_axi_aruser (m00_axi_aruser),
    .m_axi_arvalid (m00_axi_arvalid), .m_axi_arready (m00_axi_arready),
    .m_axi_rid (m00_axi_rid), .m_axi_rdata (m00_axi_rdata),
    .m_axi_rresp (m00_axi_rresp), .m_axi_rlast (m00_axi_rlast),
    .m_axi_ruser (m00_axi_ruser), .m_axi_rvalid (m00_axi_rvalid),
    .m_axi_rready (m00_axi_rready)
  );

  assign txn_wr_done = b_hs;
  assign txn_rd_done = r_hs;
  assign error       = m_err;
  assign wr_fsm_state = wr_state;
  assign rd_fsm_state = rd_state;

  // The transaction FSMs start the cipher and the master only when idle.
  assert property (@(posedge aclk) disable iff (!aresetn) cc_start |-> !cc_busy);
  assert property (@(posedge aclk) disable iff (!aresetn) (m_wr_start || m_rd_start) |-> !m_busy);

endmodule
