// cipher_control_tb: starts the cipher control with random key, address,
// nonce and data, and checks that done comes exactly 13 cycles after start
// (1 load + 12 initialization rounds), that busy covers the operation, that
// the result is data XOR the reference keystream, that running it again on
// the result restores the data, and that the result holds until the next
// start.
module cipher_control_tb;
  import ascon_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [127:0] key;
  logic [31:0] addr, nonce, din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cipher_control dut (
    .clk, .rst_n, .start_i(start), .key_i(key), .addr_i(addr), .nonce_i(nonce),
    .data_i(din), .busy_o(busy), .done_o(done), .data_o(dout)
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
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(output logic [31:0] res, output int lat);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    check(busy, "busy after start");
    while (!done) begin @(negedge clk); lat++; end
    res = dout;
    @(negedge clk);
    check(!busy && dout == res, "result held after done");
  endtask

  initial begin
    logic [31:0] exp, r1, r2;
    int lat;
    start = 0; key = '0; addr = '0; nonce = '0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      addr = $urandom; nonce = $urandom; din = $urandom;
      exp = din ^ llmee_ks(key, addr, nonce);
      run(r1, lat);
      check(r1 == exp, $sformatf("t%0d encrypt %h want %h", t, r1, exp));
      check(lat == 13, $sformatf("t%0d latency %0d", t, lat));
      din = r1;
      run(r2, lat);
      check(r2 == (exp ^ llmee_ks(key, addr, nonce)), $sformatf("t%0d decrypt %h", t, r2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
