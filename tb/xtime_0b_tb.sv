// Exhaustive test of xtime_0b: all 256 input bytes against {0b}*b computed
// by shift-and-add in the reference model.
module xtime_0b_tb;
  import aes_ref_pkg::*;
  logic [7:0] b, x;
  int checks = 0, failures = 0;

  xtime_0b dut (.b(b), .x(x));

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
      if (x !== gmul(b, 8'h0b)) begin
        failures++;
        $display("mismatch b=%h got %h want %h", b, x, gmul(b, 8'h0b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
