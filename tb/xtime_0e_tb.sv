// Exhaustive test of xtime_0e: all 256 input bytes against {0e}*b computed
// by shift-and-add in the reference model.
module xtime_0e_tb;
  import aes_ref_pkg::*;
  logic [7:0] b, x;
  int checks = 0, failures = 0;

  xtime_0e dut (.b(b), .x(x));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      b = 8'(v);
      #1;
      checks++;
      if (x !== gmul(b, 8'h0e)) begin
        failures++;
        $display("mismatch b=%h got %h want %h", b, x, gmul(b, 8'h0e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
