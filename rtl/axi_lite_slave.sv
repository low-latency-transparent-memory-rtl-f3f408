// axi_lite_slave: 32-bit AXI4-Lite slave port through which the CPU reaches
// the encrypted memory window.
//
// Write: AWREADY and WREADY are raised together, in the cycle in which both
// AWVALID and WVALID are high and no write is pending, so address and data are
// accepted in one handshake.  The pair is held (wr_req_o, waddr_o, wdata_o)
// until the engine answers with wr_resp_i; then BVALID is raised with BRESP
// OKAY, or SLVERR if wr_err_i, until BREADY.  Read: ARREADY is raised when
// ARVALID is high and no read is pending; the address is held (rd_req_o,
// raddr_o) until rd_resp_i, which loads RDATA/RRESP and raises RVALID until
// RREADY.  One write and one read can be pending at the same time.
//
// Only whole 32-bit words are supported, as in the design: WSTRB and the
// PROT signals are ignored.  b_hs_o / r_hs_o flag the response handshakes.
module axi_lite_slave
  import llmee_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic [2:0]        s_axi_awprot,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [DATA_W-1:0] s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic [2:0]        s_axi_arprot,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [DATA_W-1:0] s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // engine side
  output logic              wr_req_o,
  output logic [ADDR_W-1:0] waddr_o,
  output logic [DATA_W-1:0] wdata_o,
  input  logic              wr_resp_i,
  input  logic              wr_err_i,
  output logic              rd_req_o,
  output logic [ADDR_W-1:0] raddr_o,
  input  logic              rd_resp_i,
  input  logic              rd_err_i,
  input  logic [DATA_W-1:0] rd_data_i,
  output logic              b_hs_o,
  output logic              r_hs_o
);

  logic wr_pend_q, rd_pend_q;
  logic aw_hs, ar_hs;

  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && !wr_pend_q;
  assign s_axi_wready  = s_axi_awready;
  assign s_axi_arready = s_axi_arvalid && !rd_pend_q;
  assign aw_hs  = s_axi_awready;
  assign ar_hs  = s_axi_arready;
  assign b_hs_o = s_axi_bvalid && s_axi_bready;
  assign r_hs_o = s_axi_rvalid && s_axi_rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend_q    <= 1'b0;
      rd_pend_q    <= 1'b0;
      waddr_o      <= '0;
      wdata_o      <= '0;
      raddr_o      <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= AXI_RESP_OKAY;
      s_axi_rvalid <= 1'b0;
      s_axi_rresp  <= AXI_RESP_OKAY;
      s_axi_rdata  <= '0;
    end else begin
      // write channel
      if (aw_hs) begin
        wr_pend_q <= 1'b1;
        waddr_o   <= s_axi_awaddr;
        wdata_o   <= s_axi_wdata;
      end
      if (wr_resp_i) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= wr_err_i ? AXI_RESP_SLVERR : AXI_RESP_OKAY;
      end else if (b_hs_o) begin
        s_axi_bvalid <= 1'b0;
        wr_pend_q    <= 1'b0;
      end
      // read channel
      if (ar_hs) begin
        rd_pend_q <= 1'b1;
        raddr_o   <= s_axi_araddr;
      end
      if (rd_resp_i) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= rd_data_i;
        s_axi_rresp  <= rd_err_i ? AXI_RESP_SLVERR : AXI_RESP_OKAY;
      end else if (r_hs_o) begin
        s_axi_rvalid <= 1'b0;
        rd_pend_q    <= 1'b0;
      end
    end
  end

  assign wr_req_o = wr_pend_q;
  assign rd_req_o = rd_pend_q;

  // AXI rule: a raised VALID stays up until its READY.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
