// axi_lite_slave_tb: a CPU-side driver issues AXI4-Lite writes and reads
// while an engine-side model answers after random delays.  Checks that
// address and data are taken in one handshake only when both are valid, that
// the request is held until the engine answers, that no second write is
// taken while one is pending, that B and R carry OKAY or SLVERR as the
// engine says and stay up until the CPU takes them, and the read data.
module axi_lite_slave_tb;
  logic clk = 0, rst_n = 0;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [1:0] bresp, rresp;
  logic wr_req, rd_req, wr_resp, wr_err, rd_resp, rd_err, b_hs, r_hs;
  logic [31:0] waddr_o, wdata_o, raddr_o, rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_lite_slave dut (
    .clk, .rst_n, .s_axi_awaddr(awaddr), .s_axi_awprot(3'b0), .s_axi_awvalid(awvalid),
    .s_axi_awready(awready), .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(3'b0), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid),
    .s_axi_rready(rready), .wr_req_o(wr_req), .waddr_o(waddr_o), .wdata_o(wdata_o),
    .wr_resp_i(wr_resp), .wr_err_i(wr_err), .rd_req_o(rd_req), .raddr_o(raddr_o),
    .rd_resp_i(rd_resp), .rd_err_i(rd_err), .rd_data_i(rd_data), .b_hs_o(b_hs), .r_hs_o(r_hs)
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

  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d, input bit err);
    int lag = $urandom_range(0, 3);
    @(negedge clk);
    awaddr = a; awvalid = 1;
    // data arrives later: no handshake before both are valid
    repeat (lag) begin
      @(negedge clk);
      check(!awready && !wready, "no write handshake with WVALID low");
    end
    wdata = d; wvalid = 1;
    #1 check(awready && wready, "AW and W taken together");
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    check(wr_req && waddr_o == a && wdata_o == d, "write request held");
    // a second write must wait
    awvalid = 1; wvalid = 1;
    #1 check(!awready, "second write refused while pending");
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    repeat ($urandom_range(1, 6)) @(negedge clk);
    check(wr_req && !bvalid, "request waits for the engine");
    wr_err = err; wr_resp = 1;
    @(negedge clk) wr_resp = 0;
    check(bvalid && bresp == (err ? 2'b10 : 2'b00), "B response");
    repeat ($urandom_range(0, 3)) @(negedge clk);
    check(bvalid, "B held until BREADY");
    bready = 1;
    @(negedge clk) bready = 0;
    check(!bvalid && !wr_req, "write finished");
  endtask

  task automatic cpu_read(input logic [31:0] a, input logic [31:0] d, input bit err);
    @(negedge clk);
    araddr = a; arvalid = 1;
    #1 check(arready, "AR taken");
    @(negedge clk) arvalid = 0;
    check(rd_req && raddr_o == a, "read request held");
    repeat ($urandom_range(1, 6)) @(negedge clk);
    rd_data = d; rd_err = err; rd_resp = 1;
    @(negedge clk) begin rd_resp = 0; rd_data = ~d; end
    repeat ($urandom_range(0, 3)) @(negedge clk);
    check(rvalid && rdata == d && rresp == (err ? 2'b10 : 2'b00), "R response");
    rready = 1;
    @(negedge clk) rready = 0;
    check(!rvalid && !rd_req, "read finished");
  endtask

  initial begin
    awaddr = 0; wdata = 0; araddr = 0; awvalid = 0; wvalid = 0; bready = 0;
    arvalid = 0; rready = 0; wr_resp = 0; wr_err = 0; rd_resp = 0; rd_err = 0; rd_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      if (t % 2 == 0) cpu_write($urandom, $urandom, (t % 10) == 4);
      else cpu_read($urandom, $urandom, (t % 10) == 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
