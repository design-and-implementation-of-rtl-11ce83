// Both variants of aes_enc_round (full and FINAL) against the reference
// round on the FIPS-197 Appendix B round-1 input and on random states/keys.
module aes_enc_round_tb;
  import aes_ref_pkg::*;
  logic [127:0] st, rk, o_full, o_final;
  int checks = 0, failures = 0;

  aes_enc_round #(.FINAL(1'b0)) dut_full  (.state_in(st), .round_key(rk), .state_out(o_full));
  aes_enc_round #(.FINAL(1'b1)) dut_final (.state_in(st), .round_key(rk), .state_out(o_final));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, input logic [127:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("mismatch st=%h rk=%h got %h want %h", st, rk, got, want);
    end
  endtask

  initial begin
    // FIPS-197 Appendix B: round 1 start state, round key 1, round 2 start state
    st = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    #1; check(o_full, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int n = 0; n < 200; n++) begin
      st = rand128(); rk = rand128(); #1;
      check(o_full,  enc_round(st, rk, 0));
      check(o_final, enc_round(st, rk, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
