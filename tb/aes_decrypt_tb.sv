// aes_decrypt pipeline: FIPS-197 Appendix B and C.1 ciphertexts, then the
// reference encryptions of random blocks, back to back and with random gaps.
// Every result must be the original plaintext and appear exactly 10 clocks
// after its block was accepted; a block per clock must be sustained.
module aes_decrypt_tb;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  localparam int LAT = 10;
  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  block_t      in_block, out_block;
  round_keys_t rks;
  logic [127:0] key;
  int checks = 0, failures = 0, cycle = 0, n_out = 0;
  logic [127:0] exp_q [$];
  int           t_q   [$];

  aes_decrypt dut (.clk(clk), .rst_n(rst_n), .round_keys(rks), .in_valid(in_valid),
                   .in_block(in_block), .out_valid(out_valid), .out_block(out_block));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_key(input logic [127:0] k);
    logic [127:0] r [11];
    expand(k, r);
    key = k;
    for (int i = 0; i < 11; i++) rks[i] = r[i];
  endtask

  // issue on a negedge, so it is accepted on the next posedge
  task automatic issue(input logic [127:0] pt, input logic [127:0] want);
    in_valid = 1; in_block = pt;
    exp_q.push_back(want); t_q.push_back(cycle + 1);
    @(negedge clk);
    in_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    n_out++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      automatic logic [127:0] w = exp_q.pop_front();
      automatic int t = t_q.pop_front();
      if (out_block !== w) begin failures++; $display("got %h want %h", out_block, w); end
      checks++;
      if (cycle - t != LAT - 1) begin failures++; $display("latency %0d", cycle - t + 1); end
    end
  end

  initial begin
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    issue(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    repeat (12) @(negedge clk);
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    issue(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    repeat (12) @(negedge clk);
    set_key(rand128());
    for (int n = 0; n < 60; n++) begin            // back to back
      automatic logic [127:0] p = rand128();
      issue(encrypt(p, key), p);
    end
    for (int n = 0; n < 40; n++) begin            // random gaps
      automatic logic [127:0] p = rand128();
      issue(encrypt(p, key), p);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != 102 || exp_q.size() != 0) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
