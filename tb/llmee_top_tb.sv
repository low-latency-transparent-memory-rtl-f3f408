// llmee_top_tb: end-to-end test of the LLMEE at its default parameters,
// between an AXI4-Lite CPU driver and a behavioural AXI4 memory.
//
// The CPU writes random words into the encrypted window and reads them back.
// Independently of the design, the testbench checks every stored memory word:
// it must sit at DDR_BASE + 2 * (CPU address - LLMEE_BASE) and hold
// {nonce, plaintext ^ keystream(key, DRAM address, nonce)} with the keystream
// from the reference ASCON model.  It also checks that reads return the
// plaintext, that rewriting a word uses a new nonce, and that a memory error
// reaches the CPU as SLVERR.  Mechanisms counted (each must occur): encrypted
// write, decrypted read, halted write, halted read, memory error on write,
// memory error on read, fresh nonce per write.
module llmee_top_tb;
  import ascon_ref_pkg::*;

  localparam logic [31:0]  LLMEE_BASE = 32'h4000_0000;
  localparam logic [31:0]  DDR_BASE   = 32'h1000_0000;
  localparam logic [127:0] KEY        = 128'h0001_0203_0405_0607_0809_0A0B_0C0D_0E0F;
  localparam int unsigned  WORDS      = 1024;               // CPU words covered by the memory
  localparam logic [31:0]  ERR_CPU    = LLMEE_BASE + 4 * (WORDS - 1);
  localparam logic [31:0]  ERR_DDR    = DDR_BASE + 8 * (WORDS - 1);

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
  int n_wr = 0, n_rd = 0, n_whalt = 0, n_rhalt = 0, n_werr = 0, n_rerr = 0, n_fresh = 0;

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

  axi_mem_model #(.BASE(DDR_BASE), .DEPTH(WORDS), .MAX_DELAY(2), .ERR_ADDR(ERR_DDR)) mem (
    .clk, .rst_n, .awaddr, .awlen, .awvalid, .awready, .wdata, .wstrb, .wlast,
    .wvalid, .wready, .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready,
    .rdata, .rresp, .rlast, .rvalid, .rready
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (whalt) n_whalt++;
    if (rhalt) n_rhalt++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_awaddr = a; s_wdata = d; s_awvalid = 1; s_wvalid = 1;
    do @(posedge clk); while (!s_awready);
    #1 begin s_awvalid = 0; s_wvalid = 0; s_bready = 1; end
    do @(posedge clk); while (!s_bvalid);
    resp = s_bresp;
    #1 s_bready = 0;
  endtask

  task automatic cpu_read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    #1 begin s_arvalid = 0; s_rready = 1; end
    do @(posedge clk); while (!s_rvalid);
    d = s_rdata; resp = s_rresp;
    #1 s_rready = 0;
  endtask

  logic [31:0] shadow [WORDS];
  logic [31:0] last_nonce [WORDS];
  bit          written [WORDS];

  // check the stored word of CPU word index i against the reference
  task automatic check_stored(input int i);
    logic [31:0] daddr = DDR_BASE + 8 * i;
    logic [63:0] w = mem.mem[i];
    logic [31:0] ks = llmee_ks(KEY, daddr, w[63:32]);
    check(w[31:0] == (shadow[i] ^ ks), $sformatf("stored word %0d: %h", i, w));
    if (last_nonce[i] != w[63:32]) n_fresh++;
    else if (written[i]) check(0, $sformatf("nonce reused at word %0d", i));
    last_nonce[i] = w[63:32];
  endtask

  task automatic do_write(input int i, input logic [31:0] d);
    logic [1:0] r;
    cpu_write(LLMEE_BASE + 4 * i, d, r);
    check(r == 2'b00, "write OKAY");
    shadow[i] = d;
    check_stored(i);
    written[i] = 1;
    n_wr++;
  endtask

  task automatic do_read(input int i);
    logic [31:0] d;
    logic [1:0] r;
    cpu_read(LLMEE_BASE + 4 * i, d, r);
    check(r == 2'b00 && d == shadow[i], $sformatf("read word %0d got %h want %h", i, d, shadow[i]));
    n_rd++;
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0] r;
    s_awaddr = 0; s_wdata = 0; s_araddr = 0; s_awvalid = 0; s_wvalid = 0;
    s_bready = 0; s_arvalid = 0; s_rready = 0;
    for (int i = 0; i < WORDS; i++) begin shadow[i] = 0; last_nonce[i] = 0; written[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. memory test: write every word but the error word, then read all
    for (int i = 0; i < WORDS - 1; i++) do_write(i, $urandom);
    for (int i = 0; i < WORDS - 1; i++) do_read(i);
    // plaintext must not appear in memory
    begin
      int same = 0;
      for (int i = 0; i < WORDS - 1; i++) if (mem.mem[i][31:0] == shadow[i]) same++;
      check(same < 3, $sformatf("%0d words stored in clear", same));
    end

    // 2. rewrite a few words: new nonce, new ciphertext, old value gone
    for (int t = 0; t < 50; t++) begin
      automatic int i = $urandom_range(0, WORDS - 2);
      automatic logic [31:0] old_ct = mem.mem[i][31:0];
      do_write(i, shadow[i]);            // same plaintext again
      check(mem.mem[i][31:0] != old_ct, "same plaintext gives new ciphertext");
      do_read(i);
    end

    // 3. concurrent reads and writes: the engine serialises them, halting one
    for (int t = 0; t < 100; t++) begin
      automatic int iw = $urandom_range(0, WORDS / 2 - 1);
      automatic int ir = $urandom_range(WORDS / 2, WORDS - 2);
      fork
        begin
          if (t % 2) repeat (4) @(posedge clk);   // odd t: the read goes first
          do_write(iw, $urandom);
        end
        do_read(ir);
      join
      do_read(iw);
    end

    // 4. memory errors reach the CPU
    cpu_write(ERR_CPU, 32'h1234_5678, r);
    check(r == 2'b10 && err, "write error gives SLVERR");
    if (r == 2'b10) n_werr++;
    cpu_read(ERR_CPU, d, r);
    check(r == 2'b10 && err, "read error gives SLVERR");
    if (r == 2'b10) n_rerr++;
    do_read(0);
    check(!err, "error flag cleared by a good transaction");

    $display("writes=%0d reads=%0d write_halts=%0d read_halts=%0d write_errors=%0d read_errors=%0d fresh_nonces=%0d",
             n_wr, n_rd, n_whalt, n_rhalt, n_werr, n_rerr, n_fresh);
    check(n_wr > 0, "encrypted writes happened");
    check(n_rd > 0, "decrypted reads happened");
    check(n_whalt > 0, "a write was halted");
    check(n_rhalt > 0, "a read was halted");
    check(n_werr > 0 && n_rerr > 0, "memory errors happened");
    check(n_fresh >= n_wr, "every write drew a fresh nonce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
