// ascon_round_tb: checks one combinational ASCON round against the
// table-driven reference for all twelve round constants and random states,
// plus a state of all zeros.
module ascon_round_tb;
  import llmee_pkg::*;
  import ascon_ref_pkg::*;

  ascon_state_t st_i, st_o;
  logic [7:0]   rc;
  int checks = 0, failures = 0;

  ascon_round dut (.state_i(st_i), .rc_i(rc), .state_o(st_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t s;
    for (int n = 0; n < 200; n++) begin
      automatic int i = n % 12;
      for (int w = 0; w < 5; w++) begin
        s[w] = (n == 0) ? 64'h0 : {$urandom, $urandom};
        st_i[w] = s[w];
      end
      rc = 8'(((15 - i) << 4) | i);
      #1;
      round(s, i);
      for (int w = 0; w < 5; w++) begin
        checks++;
        if (st_o[w] !== s[w]) begin
          failures++;
          $display("round %0d word %0d: got %h want %h", i, w, st_o[w], s[w]);
        end
      end
    end
    // the package function must give the printed constant table
    checks++;
    if (ascon_rc(4'd0) != 8'hf0 || ascon_rc(4'd5) != 8'ha5 || ascon_rc(4'd11) != 8'h4b) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
