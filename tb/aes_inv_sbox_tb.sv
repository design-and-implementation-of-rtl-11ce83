// Exhaustive test of the composite-field inverse S-box against the
// reference (search of the forward reference S-box), plus InvS(00)=52, InvS(ed)=53.
module aes_inv_sbox_tb;
  import aes_ref_pkg::*;
  logic [7:0] a, s;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.s(a), .a(s));

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
      a = 8'(v); #1; check(s, inv_sbox(a));
    end
    a = 8'h00; #1; check(s, 8'h52);
    a = 8'hed; #1; check(s, 8'h53);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
