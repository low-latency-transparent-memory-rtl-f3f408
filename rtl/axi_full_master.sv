// axi_full_master: 64-bit AXI4 master that moves one {nonce, ciphertext}
// word between the LLMEE and memory.
//
// Every transaction is a single beat (burst length 1, INCR, full 8-byte
// size, all strobes set), since the engine handles one 32-bit CPU word at a
// time.  wr_start_i starts a write of wdata_i to addr_i: AWVALID and WVALID
// (with WLAST) are raised together and each is dropped on its own handshake;
// then BREADY waits for the response.  rd_start_i starts a read: ARVALID until
// ARREADY, then RREADY until RVALID; the beat is kept in rdata_o.
// txn_done_o pulses for one cycle when the response arrives; error_o holds
// whether that response was not OKAY, until the next start.
//
// Timing: a start is accepted only in IDLE (busy_o low).  VALIDs rise the
// cycle after the start; txn_done_o rises the cycle after the B or R beat is
// taken.  Only BURST_LEN = 1 is built, the configuration the design uses.
module axi_full_master
  import llmee_pkg::*;
#(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned DATA_W    = 64,
  parameter int unsigned ID_W      = 1,
  parameter int unsigned USER_W    = 1,
  parameter int unsigned BURST_LEN = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // engine side
  input  logic              wr_start_i,
  input  logic              rd_start_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic [DATA_W-1:0] rdata_o,
  output logic              txn_done_o,
  output logic              error_o,
  output logic              busy_o,
  // AXI4 master
  output logic [ID_W-1:0]     m_axi_awid,
  output logic [ADDR_W-1:0]   m_axi_awaddr,
  output logic [7:0]          m_axi_awlen,
  output logic [2:0]          m_axi_awsize,
  output logic [1:0]          m_axi_awburst,
  output logic                m_axi_awlock,
  output logic [3:0]          m_axi_awcache,
  output logic [2:0]          m_axi_awprot,
  output logic [3:0]          m_axi_awqos,
  output logic [USER_W-1:0]   m_axi_awuser,
  output logic                m_axi_awvalid,
  input  logic                m_axi_awready,
  output logic [DATA_W-1:0]   m_axi_wdata,
  output logic [DATA_W/8-1:0] m_axi_wstrb,
  output logic                m_axi_wlast,
  output logic [USER_W-1:0]   m_axi_wuser,
  output logic                m_axi_wvalid,
  input  logic                m_axi_wready,
  input  logic [ID_W-1:0]     m_axi_bid,
  input  logic [1:0]          m_axi_bresp,
  input  logic [USER_W-1:0]   m_axi_buser,
  input  logic                m_axi_bvalid,
  output logic                m_axi_bready,
  output logic [ID_W-1:0]     m_axi_arid,
  output logic [ADDR_W-1:0]   m_axi_araddr,
  output logic [7:0]          m_axi_arlen,
  output logic [2:0]          m_axi_arsize,
  output logic [1:0]          m_axi_arburst,
  output logic                m_axi_arlock,
  output logic [3:0]          m_axi_arcache,
  output logic [2:0]          m_axi_arprot,
  output logic [3:0]          m_axi_arqos,
  output logic [USER_W-1:0]   m_axi_aruser,
  output logic                m_axi_arvalid,
  input  logic                m_axi_arready,
  input  logic [ID_W-1:0]     m_axi_rid,
  input  logic [DATA_W-1:0]   m_axi_rdata,
  input  logic [1:0]          m_axi_rresp,
  input  logic                m_axi_rlast,
  input  logic [USER_W-1:0]   m_axi_ruser,
  input  logic                m_axi_rvalid,
  output logic                m_axi_rready
);

  if (BURST_LEN != 1) begin : g_burst_check
    $error("axi_full_master supports BURST_LEN = 1 only");
  end

  localparam logic [2:0] BEAT_SIZE = 3'($clog2(DATA_W / 8));

  mst_state_e  state_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] wdata_q;

  // fixed attributes of every transaction
  assign m_axi_awid    = '0;
  assign m_axi_awlen   = 8'(BURST_LEN - 1);
  assign m_axi_awsize  = BEAT_SIZE;
  assign m_axi_awburst = 2'b01;      // INCR
  assign m_axi_awlock  = 1'b0;
  assign m_axi_awcache = 4'b0010;    // normal, non-cacheable
  assign m_axi_awprot  = 3'b000;
  assign m_axi_awqos   = 4'h0;
  assign m_axi_awuser  = '0;
  assign m_axi_arid    = '0;
  assign m_axi_arlen   = 8'(BURST_LEN - 1);
  assign m_axi_arsize  = BEAT_SIZE;
  assign m_axi_arburst = 2'b01;
  assign m_axi_arlock  = 1'b0;
  assign m_axi_arcache = 4'b0010;
  assign m_axi_arprot  = 3'b000;
  assign m_axi_arqos   = 4'h0;
  assign m_axi_aruser  = '0;
  assign m_axi_wuser   = '0;
  assign m_axi_wstrb   = '1;
  assign m_axi_wlast   = m_axi_wvalid;

  assign m_axi_awaddr = addr_q;
  assign m_axi_araddr = addr_q;
  assign m_axi_wdata  = wdata_q;
  assign m_axi_bready = (state_q == M_WRESP);
  assign m_axi_rready = (state_q == M_RDATA);
  assign busy_o       = (state_q != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= M_IDLE;
      addr_q        <= '0;
      wdata_q       <= '0;
      rdata_o       <= '0;
      m_axi_awvalid <= 1'b0;
      m_axi_wvalid  <= 1'b0;
      m_axi_arvalid <= 1'b0;
      txn_done_o    <= 1'b0;
      error_o       <= 1'b0;
    end else begin
      txn_done_o <= 1'b0;
      unique case (state_q)
        M_IDLE: begin
          if (wr_start_i) begin
            addr_q        <= addr_i;
            wdata_q       <= wdata_i;
            m_axi_awvalid <= 1'b1;
            m_axi_wvalid  <= 1'b1;
            error_o       <= 1'b0;
            state_q       <= M_WRITE;
          end else if (rd_start_i) begin
            addr_q        <= addr_i;
            m_axi_arvalid <= 1'b1;
            error_o       <= 1'b0;
            state_q       <= M_READ;
          end
        end
        M_WRITE: begin
          if (m_axi_awready) m_axi_awvalid <= 1'b0;
          if (m_axi_wready)  m_axi_wvalid  <= 1'b0;
          if ((m_axi_awready || !m_axi_awvalid) && (m_axi_wready || !m_axi_wvalid))
            state_q <= M_WRESP;
        end
        M_WRESP: begin
          if (m_axi_bvalid) begin
            error_o    <= (m_axi_bresp != AXI_RESP_OKAY);
            txn_done_o <= 1'b1;
            state_q    <= M_IDLE;
          end
        end
        M_READ: begin
          if (m_axi_arready) begin
            m_axi_arvalid <= 1'b0;
            state_q       <= M_RDATA;
          end
        end
        M_RDATA: begin
          if (m_axi_rvalid) begin
            rdata_o    <= m_axi_rdata;
            error_o    <= (m_axi_rresp != AXI_RESP_OKAY);
            txn_done_o <= 1'b1;
            state_q    <= M_IDLE;
          end
        end
        default: state_q <= M_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_start_i && rd_start_i));
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axi_awvalid && !m_axi_awready |=> m_axi_awvalid && $stable(m_axi_awaddr));
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));

endmodule
