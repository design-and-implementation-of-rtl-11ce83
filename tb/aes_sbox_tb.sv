// Exhaustive test of the composite-field S-box against the reference S-box
// (x^254 and the affine map), plus the FIPS-197 entries S(00)=63, S(53)=ed.
module aes_sbox_tb;
  import aes_ref_pkg::*;
  logic [7:0] a, s;
  int checks = 0, failures = 0;

  aes_sbox dut (.a(a), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("mismatch a=%h got %h want %h", a, got, want);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v); #1; check(s, sbox(a));
    end
    a = 8'h00; #1; check(s, 8'h63);
    a = 8'h53; #1; check(s, 8'hed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
