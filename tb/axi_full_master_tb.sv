// axi_full_master_tb: the master writes and reads random 64-bit words through
// a memory model with random back-pressure.  Checks the stored words, the
// returned words, single-beat attributes (AWLEN 0, 8-byte size, INCR, WLAST),
// one txn_done pulse per transaction, and the error flag for an access that
// the memory answers with SLVERR.
module axi_full_master_tb;
  localparam logic [31:0] MBASE = 32'h1000_0000;
  localparam logic [31:0] EADDR = MBASE + 32'h1F8;

  logic clk = 0, rst_n = 0;
  logic wr_start, rd_start, done, err, busy;
  logic [31:0] addr;
  logic [63:0] wdata, rdata;
  logic [0:0] awid, arid, awuser, aruser, wuser;
  logic [31:0] awaddr, araddr;
  logic [7:0] awlen, arlen, wstrb;
  logic [2:0] awsize, arsize, awprot, arprot;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awlock, arlock, awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [3:0] awcache, arcache, awqos, arqos;
  logic [63:0] m_wdata, m_rdata;
  int checks = 0, failures = 0, dones = 0;

  always #5 clk = ~clk;

  axi_full_master dut (
    .clk, .rst_n, .wr_start_i(wr_start), .rd_start_i(rd_start), .addr_i(addr),
    .wdata_i(wdata), .rdata_o(rdata), .txn_done_o(done), .error_o(err), .busy_o(busy),
    .m_axi_awid(awid), .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize),
    .m_axi_awburst(awburst), .m_axi_awlock(awlock), .m_axi_awcache(awcache),
    .m_axi_awprot(awprot), .m_axi_awqos(awqos), .m_axi_awuser(awuser),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(m_wdata),
    .m_axi_wstrb(wstrb), .m_axi_wlast(wlast), .m_axi_wuser(wuser), .m_axi_wvalid(wvalid),
    .m_axi_wready(wready), .m_axi_bid(1'b0), .m_axi_bresp(bresp), .m_axi_buser(1'b0),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready), .m_axi_arid(arid), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arlock(arlock), .m_axi_arcache(arcache), .m_axi_arprot(arprot),
    .m_axi_arqos(arqos), .m_axi_aruser(aruser), .m_axi_arvalid(arvalid),
    .m_axi_arready(arready), .m_axi_rid(1'b0), .m_axi_rdata(m_rdata), .m_axi_rresp(rresp),
    .m_axi_rlast(rlast), .m_axi_ruser(1'b0), .m_axi_rvalid(rvalid), .m_axi_rready(rready)
  );

  axi_mem_model #(.BASE(MBASE), .DEPTH(64), .MAX_DELAY(3), .ERR_ADDR(EADDR)) mem (
    .clk, .rst_n, .awaddr, .awlen, .awvalid, .awready, .wdata(m_wdata), .wstrb, .wlast,
    .wvalid, .wready, .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready,
    .rdata(m_rdata), .rresp, .rlast, .rvalid, .rready
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (done) dones++;
  always @(posedge clk) if (awvalid)
    if (awlen != 0 || awsize != 3 || awburst != 2'b01 || !wlast && wvalid) begin
      failures++; $display("bad write attributes");
    end

  task automatic txn(input bit wr, input logic [31:0] a, input logic [63:0] d);
    int n0 = dones;
    @(negedge clk);
    addr = a; wdata = d; wr_start = wr; rd_start = !wr;
    @(negedge clk);
    wr_start = 0; rd_start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(dones == n0 + 1 && !busy, "one done pulse");
  endtask

  initial begin
    logic [63:0] shadow [64];
    wr_start = 0; rd_start = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 64; i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int idx = $urandom_range(0, 62);
      automatic logic [31:0] a = MBASE + idx * 8;
      if ($urandom_range(0, 1)) begin
        automatic logic [63:0] d = {$urandom, $urandom};
        txn(1, a, d);
        shadow[idx] = d;
        check(mem.mem[idx] == d && !err, $sformatf("write %h", a));
      end else begin
        txn(0, a, '0);
        check(rdata == shadow[idx] && !err, $sformatf("read %h got %h want %h", a, rdata, shadow[idx]));
      end
    end
    txn(1, EADDR, 64'h1);
    check(err, "write error flagged");
    txn(0, MBASE, '0);
    check(!err, "error cleared by next transaction");
    txn(0, EADDR, '0);
    check(err, "read error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
