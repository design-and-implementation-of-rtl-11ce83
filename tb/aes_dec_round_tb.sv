// Both variants of aes_dec_round (full and FINAL) against the reference
// inverse round on random states and keys; the final variant must also undo
// a reference final encryption round.
module aes_dec_round_tb;
  import aes_ref_pkg::*;
  logic [127:0] st, rk, o_full, o_final;
  int checks = 0, failures = 0;

  aes_dec_round #(.FINAL(1'b0)) dut_full  (.state_in(st), .round_key(rk), .state_out(o_full));
  aes_dec_round #(.FINAL(1'b1)) dut_final (.state_in(st), .round_key(rk), .state_out(o_final));

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
    logic [127:0] pre;
    for (int n = 0; n < 200; n++) begin
      st = rand128(); rk = rand128(); #1;
      check(o_full,  dec_round(st, rk, 0));
      check(o_final, dec_round(st, rk, 1));
    end
    // the final inverse round undoes a key-less final encryption round
    for (int n = 0; n < 50; n++) begin
      pre = rand128(); rk = rand128();
      st = enc_round(pre, 128'h0, 1); #1;
      check(o_final, pre ^ rk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
