// control_logic_tb: checks the CPU-to-DRAM address translation (base
// subtracted, offset doubled, memory base added), the key register, the
// nonce sequence of the 32-bit LFSR against a bit-serial model of the
// polynomial x^32 + x^22 + x^2 + x + 1, the fixed nonce when the generator is
// disabled, and the arbitration: one owner at a time, grant one cycle after a
// request, alternation when both request, release.
module control_logic_tb;
  localparam logic [31:0]  BASE = 32'h4000_0000;
  localparam logic [31:0]  DDR  = 32'h1000_0000;
  localparam logic [127:0] K    = 128'h0f0e_0d0c_0b0a_0908_0706_0504_0302_0100;
  localparam logic [31:0]  SEED = 32'h1234_5678;

  logic clk = 0, rst_n = 0;
  logic wr_req, rd_req, rel, nnext;
  logic [31:0] waddr, raddr, Waddr, Raddr, rnd, rnd_off;
  logic [31:0] Waddr2, Raddr2;
  logic [127:0] key, key2;
  logic wg, rg, sel, wg2, rg2, sel2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_logic #(.LLMEE_BASE(BASE), .DDR_BASE(DDR), .KEY(K), .RNG_EN(1'b1),
                  .NONCE_SEED(SEED)) dut (
    .clk, .rst_n, .wr_req_i(wr_req), .rd_req_i(rd_req), .release_i(rel),
    .nonce_next_i(nnext), .waddr_i(waddr), .raddr_i(raddr), .waddr_o(Waddr),
    .raddr_o(Raddr), .key_o(key), .rand_nonce_o(rnd), .wr_grant_o(wg),
    .rd_grant_o(rg), .sel_o(sel)
  );

  control_logic #(.RNG_EN(1'b0), .DEFAULT_NONCE(32'hCAFE_F00D)) dut_fixed (
    .clk, .rst_n, .wr_req_i(1'b0), .rd_req_i(1'b0), .release_i(1'b0),
    .nonce_next_i(nnext), .waddr_i(waddr), .raddr_i(raddr), .waddr_o(Waddr2),
    .raddr_o(Raddr2), .key_o(key2), .rand_nonce_o(rnd_off), .wr_grant_o(wg2),
    .rd_grant_o(rg2), .sel_o(sel2)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bit-serial LFSR step: shift right, feedback of the dropped bit into
  // positions 31, 21, 1 and 0
  function automatic logic [31:0] lfsr_step(input logic [31:0] s);
    logic fb = s[0];
    logic [31:0] n = {1'b0, s[31:1]};
    n[31] ^= fb; n[21] ^= fb; n[1] ^= fb; n[0] ^= fb;
    return n;
  endfunction

  initial begin
    logic [31:0] model;
    wr_req = 0; rd_req = 0; rel = 0; nnext = 0; waddr = BASE; raddr = BASE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // address translation
    for (int t = 0; t < 50; t++) begin
      logic [31:0] off = {$urandom_range(0, 32'h0FFF_FFFF), 2'b00};
      waddr = BASE + off; raddr = BASE + (off ^ 32'h10);
      #1;
      check(Waddr == DDR + off * 2, $sformatf("waddr %h -> %h", waddr, Waddr));
      check(Raddr == DDR + (off ^ 32'h10) * 2, $sformatf("raddr %h -> %h", raddr, Raddr));
      check(Waddr2 == 32'h1000_0000 + off * 2, "default parameters translate");
    end
    waddr = BASE + 4; #1;
    check(Waddr == DDR + 8, "CPU word 4 maps to DRAM word 8");
    check(key == K, "key register");
    check(rnd_off == 32'hCAFE_F00D, "fixed nonce when generator off");
    // nonce sequence
    model = SEED;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      check(rnd == model, $sformatf("nonce %0d %h want %h", t, rnd, model));
      nnext = (t % 3 != 2);
      if (nnext) model = lfsr_step(model);
    end
    @(negedge clk) nnext = 0;
    @(negedge clk) check(rnd_off == 32'hCAFE_F00D, "fixed nonce stays");
    // arbitration
    check(!wg && !rg, "no owner at start");
    wr_req = 1;
    @(negedge clk) check(wg && !rg && !sel, "write granted");
    rd_req = 1;
    @(negedge clk) check(wg && !rg, "read waits while write owns");
    rel = 1; wr_req = 0;
    @(negedge clk) rel = 0;
    check(!wg && !rg, "released");
    @(negedge clk) check(rg && sel, "read granted after release");
    wr_req = 1;
    rel = 1; @(negedge clk) rel = 0;
    // both request: the write won last time, so the read... read also won last, write now
    @(negedge clk) check(wg && !rg, "write after read when both request");
    rel = 1; @(negedge clk) rel = 0;
    @(negedge clk) check(rg && !wg, "read after write when both request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
