// Enhanced inv_mix_column against the reference inverse matrix product:
// 8e 4d a1 bc must return to db 13 53 45, then 2000 random columns.
module inv_mix_column_tb;
  import aes_ref_pkg::*;
  logic [31:0] ci, co;
  int checks = 0, failures = 0;

  inv_mix_column dut (.col_in(ci), .col_out(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] want);
    checks++;
    if (co !== want) begin
      failures++;
      $display("mismatch in=%h got %h want %h", ci, co, want);
    end
  endtask

  initial begin
    ci = 32'h8e4da1bc; #1; check(32'hdb135345);
    for (int n = 0; n < 2000; n++) begin
      ci = $urandom; #1; check(mixcol(ci, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
