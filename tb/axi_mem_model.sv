// axi_mem_model: behavioural AXI4 slave memory for the testbenches, standing
// in for the DDR memory and its controller (not synthesizable, not part of
// the design).
//
// DEPTH words of DATA_W bits starting at byte address BASE.  Single-beat
// transactions only.  Each READY and each response is delayed by a random
// number of cycles up to MAX_DELAY, so the master sees back-pressure.  An
// access to the word at ERR_ADDR answers SLVERR (the write is dropped).
// Addresses outside the memory also answer SLVERR.  mem[] may be read and
// written hierarchically by a testbench.
module axi_mem_model #(
  parameter int unsigned DATA_W    = 64,
  parameter logic [31:0] BASE      = 32'h1000_0000,
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned MAX_DELAY = 3,
  parameter logic [31:0] ERR_ADDR  = 32'hFFFF_FFF8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       awaddr,
  input  logic [7:0]        awlen,
  input  logic              awvalid,
  output logic              awready,
  input  logic [DATA_W-1:0] wdata,
  input  logic [DATA_W/8-1:0] wstrb,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [31:0]       araddr,
  input  logic [7:0]        arlen,
  input  logic              arvalid,
  output logic              arready,
  output logic [DATA_W-1:0] rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready
);
  localparam int unsigned BYTES = DATA_W / 8;

  logic [DATA_W-1:0] mem [DEPTH];
  int writes = 0, reads = 0;

  function automatic bit bad(input logic [31:0] a);
    return (a == ERR_ADDR) || (a < BASE) || ((a - BASE) / BYTES >= DEPTH);
  endfunction

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  // write side
  initial begin
    logic [31:0] a;
    logic [DATA_W-1:0] d;
    bit got_a, got_w;
    awready = 0; wready = 0; bvalid = 0; bresp = 2'b00;
    forever begin
      got_a = 0; got_w = 0;
      while (!(got_a && got_w)) begin
        @(posedge clk);
        #1;
        awready = 0; wready = 0;
        if (rst_n) begin
          if (!got_a && awvalid && $urandom_range(0, MAX_DELAY) == 0) awready = 1;
          if (!got_w && wvalid && $urandom_range(0, MAX_DELAY) == 0) wready = 1;
        end
        @(posedge clk);
        if (awready && awvalid) begin got_a = 1; a = awaddr; end
        if (wready && wvalid) begin
          got_w = 1; d = wdata;
          assert (wlast && wstrb == '1) else $error("only full single beats");
        end
        #1 awready = 0; wready = 0;
        assert (awlen == 0) else $error("burst not supported");
      end
      repeat ($urandom_range(0, MAX_DELAY)) @(posedge clk);
      #1;
      if (!bad(a)) begin mem[(a - BASE) / BYTES] = d; bresp = 2'b00; end
      else bresp = 2'b10;
      writes++;
      bvalid = 1;
      do @(posedge clk); while (!bready);
      #1 bvalid = 0;
    end
  end

  // read side
  initial begin
    logic [31:0] a;
    arready = 0; rvalid = 0; rlast = 0; rdata = '0; rresp = 2'b00;
    forever begin
      do begin
        @(posedge clk);
        #1 arready = rst_n && arvalid && ($urandom_range(0, MAX_DELAY) == 0);
        @(posedge clk);
      end while (!(arready && arvalid));
      a = araddr;
      #1 arready = 0;
      repeat ($urandom_range(0, MAX_DELAY)) @(posedge clk);
      #1;
      rdata = bad(a) ? '0 : mem[(a - BASE) / BYTES];
      rresp = bad(a) ? 2'b10 : 2'b00;
      reads++;
      rvalid = 1; rlast = 1;
      do @(posedge clk); while (!rready);
      #1 begin rvalid = 0; rlast = 0; end
    end
  end
endmodule
