// llmee_memtest_tb: the memory-test workload run on the LLMEE at its default
// parameters: the CPU writes N consecutive 32-bit words through the engine,
// then reads all of them back, and the clock cycles of each phase are
// counted.  Two sizes are run: 1000 words (4 kB) and 16000 words (64 kB).
// The memory answers without wait states, so the counts are the engine's own
// cost per word plus the AXI handshakes of this testbench's CPU driver.
// Checks: every word reads back as written; every CPU transaction completes
// within MAX_TXN cycles; every write and read takes the same number of cycles
// with an ideal memory (the engine has no data-dependent timing).
module llmee_memtest_tb;
  localparam logic [31:0]  LLMEE_BASE = 32'h4000_0000;
  localparam logic [31:0]  DDR_BASE   = 32'h1000_0000;
  localparam int unsigned  WORDS      = 16384;
  localparam int unsigned  MAX_TXN    = 40;

  logic clk = 0, rst_n = 0;
  // CPU port
  logic [31:0] s_awaddr, s_wdata, s_araddr, s_rdata;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [1:0] s_bresp, s_rresp;
  // memory port
  logic [0:0] awid, arid, awuser, aruser, wuser;
  logic [31:0] awaddr, araddr;
  logic [7:0] awlen, arlen, wstrb;
  logic [2:0] awsize, arsize, awprot, arprot;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awlock, arlock, awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [3:0] awcache, arcache, awqos, arqos, wst, rst;
  logic [63:0] wdata, rdata;
  logic wr_done, rd_done, err, whalt, rhalt;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  llmee_top dut (
    .aclk(clk), .aresetn(rst_n),
    .s00_axi_awaddr(s_awaddr), .s00_axi_awprot(3'b0), .s00_axi_awvalid(s_awvalid),
    .s00_axi_awready(s_awready), .s00_axi_wdata(s_wdata), .s00_axi_wstrb(4'hF),
    .s00_axi_wvalid(s_wvalid), .s00_axi_wready(s_wready), .s00_axi_bresp(s_bresp),
    .s00_axi_bvalid(s_bvalid), .s00_axi_bready(s_bready), .s00_axi_araddr(s_araddr),
    .s00_axi_arprot(3'b0), .s00_axi_arvalid(s_arvalid), .s00_axi_arready(s_arready),
    .s00_axi_rdata(s_rdata), .s00_axi_rresp(s_rresp), .s00_axi_rvalid(s_rvalid),
    .s00_axi_rready(s_rready),
    .m00_axi_awid(awid), .m00_axi_awaddr(awaddr), .m00_axi_awlen(awlen),
    .m00_axi_awsize(awsize), .m00_axi_awburst(awburst), .m00_axi_awlock(awlock),
    .m00_axi_awcache(awcache), .m00_axi_awprot(awprot), .m00_axi_awqos(awqos),
    .m00_axi_awuser(awuser), .m00_axi_awvalid(awvalid), .m00_axi_awready(awready),
    .m00_axi_wdata(wdata), .m00_axi_wstrb(wstrb), .m00_axi_wlast(wlast),
    .m00_axi_wuser(wuser), .m00_axi_wvalid(wvalid), .m00_axi_wready(wready),
    .m00_axi_bid(1'b0), .m00_axi_bresp(bresp), .m00_axi_buser(1'b0),
    .m00_axi_bvalid(bvalid), .m00_axi_bready(bready),
    .m00_axi_arid(arid), .m00_axi_araddr(araddr), .m00_axi_arlen(arlen),
    .m00_axi_arsize(arsize), .m00_axi_arburst(arburst), .m00_axi_arlock(arlock),
    .m00_axi_arcache(arcache), .m00_axi_arprot(arprot), .m00_axi_arqos(arqos),
    .m00_axi_aruser(aruser), .m00_axi_arvalid(arvalid), .m00_axi_arready(arready),
    .m00_axi_rid(1'b0), .m00_axi_rdata(rdata), .m00_axi_rresp(rresp),
    .m00_axi_rlast(rlast), .m00_axi_ruser(1'b0), .m00_axi_rvalid(rvalid),
    .m00_axi_rready(rready),
    .txn_wr_done(wr_done), .txn_rd_done(rd_done), .error(err),
    .wr_halt(whalt), .rd_halt(rhalt), .wr_fsm_state(wst), .rd_fsm_state(rst)
  );

  axi_mem_model #(.BASE(DDR_BASE), .DEPTH(WORDS), .MAX_DELAY(0)) mem (
    .clk, .rst_n, .awaddr, .awlen, .awvalid, .awready, .wdata, .wstrb, .wlast,
    .wvalid, .wready, .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready,
    .rdata, .rresp, .rlast, .rvalid, .rready
  );

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d, output int lat);
    longint t0;
    @(negedge clk);
    t0 = cyc;
    s_awaddr = a; s_wdata = d; s_awvalid = 1; s_wvalid = 1; s_bready = 1;
    do @(posedge clk); while (!s_awready);
    #1 begin s_awvalid = 0; s_wvalid = 0; end
    while (!s_bvalid) @(posedge clk);
    #1 s_bready = 0;
    lat = int'(cyc - t0);
  endtask

  task automatic cpu_read(input logic [31:0] a, output logic [31:0] d, output int lat);
    longint t0;
    @(negedge clk);
    t0 = cyc;
    s_araddr = a; s_arvalid = 1; s_rready = 1;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0;
    while (!s_rvalid) @(posedge clk);
    d = s_rdata;
    #1 s_rready = 0;
    lat = int'(cyc - t0);
  endtask

  logic [31:0] shadow [WORDS];

  task automatic memtest(input int n);
    longint t_w0, t_w1, t_r1;
    int lat, lat_w, lat_r, bad = 0, uneven = 0;
    logic [31:0] d;
    t_w0 = cyc;
    for (int i = 0; i < n; i++) begin
      shadow[i] = $urandom;
      cpu_write(LLMEE_BASE + 4 * i, shadow[i], lat);
      if (i == 0) lat_w = lat; else if (lat != lat_w) uneven++;
      if (lat > MAX_TXN) bad++;
    end
    t_w1 = cyc;
    for (int i = 0; i < n; i++) begin
      cpu_read(LLMEE_BASE + 4 * i, d, lat);
      check(d == shadow[i], $sformatf("word %0d read %h want %h", i, d, shadow[i]));
      if (i == 0) lat_r = lat; else if (lat != lat_r) uneven++;
      if (lat > MAX_TXN) bad++;
    end
    t_r1 = cyc;
    check(bad == 0, $sformatf("%0d transactions over %0d cycles", bad, MAX_TXN));
    check(uneven == 0, $sformatf("%0d transactions with a different latency", uneven));
    $display("memtest %0d words (%0d bytes): write %0d cycles (%0d per word), read %0d cycles (%0d per word)",
             n, 4 * n, t_w1 - t_w0, lat_w, t_r1 - t_w1, lat_r);
  endtask

  initial begin
    s_awaddr = 0; s_wdata = 0; s_araddr = 0; s_awvalid = 0; s_wvalid = 0;
    s_bready = 0; s_arvalid = 0; s_rready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    memtest(1000);
    memtest(16000);
    check(mem.writes == 17000 && mem.reads == 17000, "one memory access per CPU access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
