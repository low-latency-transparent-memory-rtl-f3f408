// txn_ctrl_tb: drives the write and read FSMs with modelled grant, cipher,
// memory and CPU handshakes and checks the order of their actions: a write
// encrypts before it writes memory and answers after memory confirms; a read
// reads memory before it decrypts; every step waits for the completion of
// the one before (cipher done D, memory done M); responses wait for the CPU handshake; a
// request without the grant is halted and retried; nonce_next follows only
// writes; the two FSMs never use the shared path at once (RTL assertion).
module txn_ctrl_tb;
  import llmee_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_req, rd_req, wr_grant, rd_grant, cc_done, m_done, b_hs, r_hs;
  logic cc_start, m_wr_start, m_rd_start, wr_resp, rd_resp, rel, nnext, whalt, rhalt;
  wr_state_e ws;
  rd_state_e rs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  txn_ctrl dut (
    .clk, .rst_n, .wr_req_i(wr_req), .rd_req_i(rd_req), .wr_grant_i(wr_grant),
    .rd_grant_i(rd_grant), .cc_done_i(cc_done), .m_done_i(m_done), .b_hs_i(b_hs),
    .r_hs_i(r_hs), .cc_start_o(cc_start), .m_wr_start_o(m_wr_start),
    .m_rd_start_o(m_rd_start), .wr_resp_o(wr_resp), .rd_resp_o(rd_resp),
    .release_o(rel), .nonce_next_o(nnext), .wr_halt_o(whalt), .rd_halt_o(rhalt),
    .wr_state_o(ws), .rd_state_o(rs)
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
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Event log: each output pulse is recorded with a letter.
  string log;
  int cc_timer, m_timer, b_timer, r_timer;
  bit bvalid, rvalid;
  always @(posedge clk) if (rst_n) begin
    if (cc_start)   log = {log, "C"};
    if (cc_done)    log = {log, "D"};
    if (m_done)     log = {log, "M"};
    if (m_wr_start) log = {log, "W"};
    if (m_rd_start) log = {log, "R"};
    if (wr_resp)    log = {log, "b"};
    if (rd_resp)    log = {log, "r"};
    if (nnext)      log = {log, "n"};
    if (rel)        log = {log, "x"};
    if (whalt)      log = {log, "h"};
    if (rhalt)      log = {log, "g"};
  end

  // cipher: done 13 cycles after start; memory: done 4 cycles after start;
  // CPU: takes a response 3 cycles after it is raised.
  always @(posedge clk) begin
    cc_done <= (cc_timer == 1);
    m_done  <= (m_timer == 1);
    if (cc_start) cc_timer <= 13; else if (cc_timer > 0) cc_timer <= cc_timer - 1;
    if (m_wr_start || m_rd_start) m_timer <= 4; else if (m_timer > 0) m_timer <= m_timer - 1;
    if (wr_resp) bvalid <= 1; else if (b_hs) bvalid <= 0;
    if (rd_resp) rvalid <= 1; else if (r_hs) rvalid <= 0;
    if (wr_resp) b_timer <= 3; else if (b_timer > 0) b_timer <= b_timer - 1;
    if (rd_resp) r_timer <= 3; else if (r_timer > 0) r_timer <= r_timer - 1;
  end
  assign b_hs = bvalid && (b_timer == 0);
  assign r_hs = rvalid && (r_timer == 0);

  task automatic wait_idle();
    int n = 0;
    do begin @(negedge clk); n++; end while (!(ws == W_IDLE && rs == R_IDLE) && n < 500);
  endtask

  initial begin
    wr_req = 0; rd_req = 0; wr_grant = 0; rd_grant = 0;
    cc_timer = 0; m_timer = 0; b_timer = 0; r_timer = 0; bvalid = 0; rvalid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // a granted write
    log = "";
    @(negedge clk) begin wr_req = 1; wr_grant = 1; end
    do @(negedge clk); while (!(ws == W_DONE && b_hs));
    wr_req = 0;
    @(negedge clk) wr_grant = 0;
    wait_idle();
    check(log == "CDWMbnx", {"write order ", log});

    // a granted read
    log = "";
    @(negedge clk) begin rd_req = 1; rd_grant = 1; end
    do @(negedge clk); while (!(rs == R_TRANSFER && r_hs));
    rd_req = 0;
    @(negedge clk) rd_grant = 0;
    wait_idle();
    check(log == "RMCDrx", {"read order ", log});

    // a write that is not granted for a while is halted and retried
    log = "";
    @(negedge clk) wr_req = 1;
    repeat (9) @(negedge clk);
    check(ws inside {W_IDLE, W_ASCON_IDLE, W_HALT}, "write waits without grant");
    wr_grant = 1;
    do @(negedge clk); while (!(ws == W_DONE && b_hs));
    wr_req = 0;
    @(negedge clk) wr_grant = 0;
    wait_idle();
    check(log.len() > 7 && log.substr(0, 0) == "h" && log.substr(log.len() - 7, log.len() - 1) == "CDWMbnx",
          {"halted write ", log});

    // read and write pending together: the read is halted while the write
    // owns the path, then proceeds
    log = "";
    @(negedge clk) begin wr_req = 1; rd_req = 1; wr_grant = 1; end
    do @(negedge clk); while (!(ws == W_DONE && b_hs));
    wr_req = 0;
    @(negedge clk) begin wr_grant = 0; rd_grant = 1; end
    do @(negedge clk); while (!(rs == R_TRANSFER && r_hs));
    rd_req = 0;
    @(negedge clk) rd_grant = 0;
    wait_idle();
    begin
      int hw = 0, hr = 0, cnt_c = 0;
      for (int i = 0; i < log.len(); i++) begin
        if (log[i] == "g") hr++;
        if (log[i] == "h") hw++;
        if (log[i] == "C") cnt_c++;
      end
      check(hr > 0 && hw == 0, {"read halted behind write ", log});
      check(cnt_c == 2, "two cipher runs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
