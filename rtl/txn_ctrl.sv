// txn_ctrl: the write and read transaction state machines of the LLMEE.
//
// Two FSMs run side by side and share one cipher and one memory master; the
// control logic grants the shared path to one of them at a time.
//
// Write: IDLE -(write pending)-> ASCON_IDLE -(granted)-> START_ASCON ->
//   ENCRYPTING -(cipher done)-> WRITE_DATA (start memory write) ->
//   CHECK_WRITE -(memory done)-> RESPONSE (raise B) -> DONE -(B taken)-> IDLE.
//   ASCON_IDLE without a grant goes to HALT and back to IDLE: the request
//   stays pending at the slave and is retried.
// Read: IDLE -(read pending)-> ASCON_IDLE -(granted)-> READ_DATA (start
//   memory read) -> CHECK_READ -(memory done)-> START_ASCON -> DECRYPTING
//   -(cipher done)-> RESPONSE (raise R) -> TRANSFER -(R taken)-> IDLE, with
//   the same HALT detour.
// The memory word is read before decryption because the nonce needed for the
// keystream is stored next to the ciphertext.
//
// Outputs are one-cycle pulses decoded from the state: cc_start_o,
// m_wr_start_o, m_rd_start_o, wr_resp_o, rd_resp_o, release_o (path free),
// nonce_next_o (after a write), wr_halt_o / rd_halt_o (a halted attempt).
module txn_ctrl
  import llmee_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic wr_req_i,
  input  logic rd_req_i,
  input  logic wr_grant_i,
  input  logic rd_grant_i,
  input  logic cc_done_i,
  input  logic m_done_i,
  input  logic b_hs_i,       // B handshake with the CPU
  input  logic r_hs_i,       // R handshake with the CPU
  output logic cc_start_o,
  output logic m_wr_start_o,
  output logic m_rd_start_o,
  output logic wr_resp_o,
  output logic rd_resp_o,
  output logic release_o,
  output logic nonce_next_o,
  output logic wr_halt_o,
  output logic rd_halt_o,
  output wr_state_e wr_state_o,
  output rd_state_e rd_state_o
);

  wr_state_e ws_q, ws_d;
  rd_state_e rs_q, rs_d;

  always_comb begin
    ws_d = ws_q;
    unique case (ws_q)
      W_IDLE:        if (wr_req_i) ws_d = W_ASCON_IDLE;
      W_ASCON_IDLE:  ws_d = wr_grant_i ? W_START_ASCON : W_HALT;
      W_HALT:        ws_d = W_IDLE;
      W_START_ASCON: ws_d = W_ENCRYPTING;
      W_ENCRYPTING:  if (cc_done_i) ws_d = W_WRITE_DATA;
      W_WRITE_DATA:  ws_d = W_CHECK_WRITE;
      W_CHECK_WRITE: if (m_done_i) ws_d = W_RESPONSE;
      W_RESPONSE:    ws_d = W_DONE;
      W_DONE:        if (b_hs_i) ws_d = W_IDLE;
      default:       ws_d = W_IDLE;
    endcase
  end

  always_comb begin
    rs_d = rs_q;
    unique case (rs_q)
      R_IDLE:        if (rd_req_i) rs_d = R_ASCON_IDLE;
      R_ASCON_IDLE:  rs_d = rd_grant_i ? R_READ_DATA : R_HALT;
      R_HALT:        rs_d = R_IDLE;
      R_READ_DATA:   rs_d = R_CHECK_READ;
      R_CHECK_READ:  if (m_done_i) rs_d = R_START_ASCON;
      R_START_ASCON: rs_d = R_DECRYPTING;
      R_DECRYPTING:  if (cc_done_i) rs_d = R_RESPONSE;
      R_RESPONSE:    rs_d = R_TRANSFER;
      R_TRANSFER:    if (r_hs_i) rs_d = R_IDLE;
      default:       rs_d = R_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws_q <= W_IDLE;
      rs_q <= R_IDLE;
    end else begin
      ws_q <= ws_d;
      rs_q <= rs_d;
    end
  end

  logic wr_end, rd_end;
  assign wr_end = (ws_q == W_DONE) && b_hs_i;
  assign rd_end = (rs_q == R_TRANSFER) && r_hs_i;

  assign cc_start_o   = (ws_q == W_START_ASCON) || (rs_q == R_START_ASCON);
  assign m_wr_start_o = (ws_q == W_WRITE_DATA);
  assign m_rd_start_o = (rs_q == R_READ_DATA);
  assign wr_resp_o    = (ws_q == W_RESPONSE);
  assign rd_resp_o    = (rs_q == R_RESPONSE);
  assign release_o    = wr_end || rd_end;
  assign nonce_next_o = wr_end;
  assign wr_halt_o    = (ws_q == W_HALT);
  assign rd_halt_o    = (rs_q == R_HALT);
  assign wr_state_o   = ws_q;
  assign rd_state_o   = rs_q;

  // Only the owner of the shared path may use it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !((ws_q inside {W_START_ASCON, W_ENCRYPTING, W_WRITE_DATA, W_CHECK_WRITE}) &&
                     (rs_q inside {R_READ_DATA, R_CHECK_READ, R_START_ASCON, R_DECRYPTING})));

endmodule
