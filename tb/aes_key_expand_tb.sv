// aes_key_expand: the FIPS-197 Appendix A.1 key 2b7e...3c must give round
// key 1 a0fafe17... with Rcon 01; then every step of random keys against
// the reference expansion.
module aes_key_expand_tb;
  import aes_ref_pkg::*;
  logic [127:0] ki, ko;
  logic [7:0]   rc;
  int checks = 0, failures = 0;

  aes_key_expand dut (.key_in(ki), .rcon(rc), .key_out(ko));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] want);
    checks++;
    if (ko !== want) begin
      failures++;
      $display("mismatch key=%h rcon=%h got %h want %h", ki, rc, ko, want);
    end
  endtask

  initial begin
    ki = 128'h2b7e151628aed2a6abf7158809cf4f3c; rc = 8'h01; #1;
    check(128'ha0fafe1788542cb123a339392a6c7605);
    for (int n = 0; n < 300; n++) begin
      ki = rand128(); rc = 8'($urandom); #1;
      check(next_key(ki, rc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
