// tweak_select_tb: random stimulus on both settings of sel; checks the
// address, nonce and cipher-input selections and the {nonce, ciphertext}
// memory word.
module tweak_select_tb;
  logic sel;
  logic [31:0] waddr, raddr, rnonce, wdata, cout, addr, nonce, cin;
  logic [63:0] rword, wword;
  int checks = 0, failures = 0;

  tweak_select dut (
    .sel_i(sel), .waddr_i(waddr), .raddr_i(raddr), .rand_nonce_i(rnonce),
    .cpu_wdata_i(wdata), .rd_word_i(rword), .cipher_out_i(cout),
    .addr_o(addr), .nonce_o(nonce), .cipher_in_o(cin), .wr_word_o(wword)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel = t[0];
      waddr = $urandom; raddr = $urandom; rnonce = $urandom; wdata = $urandom;
      cout = $urandom; rword = {$urandom, $urandom};
      #1;
      if (!sel) begin
        check(addr == waddr, "write address");
        check(nonce == rnonce, "fresh nonce on write");
        check(cin == wdata, "plaintext into cipher");
        check(wword[31:0] == cout && wword[63:32] == rnonce, "memory word on write");
      end else begin
        check(addr == raddr, "read address");
        check(nonce == rword[63:32], "stored nonce on read");
        check(cin == rword[31:0], "stored ciphertext into cipher");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
