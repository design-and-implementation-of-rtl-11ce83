// aes_key_schedule: loads several keys (FIPS-197 A.1 and random ones),
// checks that key_ready rises exactly ten clocks after the load edge, that
// all eleven round keys match the reference expansion, that a second load
// during an expansion restarts it, and that the keys are held afterwards.
module aes_key_schedule_tb;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  logic        clk = 0, rst_n = 0, key_load = 0;
  block_t      key;
  round_keys_t rks;
  logic        key_ready;
  int checks = 0, failures = 0;

  aes_key_schedule dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key(key),
                        .round_keys(rks), .key_ready(key_ready));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_check(input logic [127:0] k);
    logic [127:0] want [11];
    int cycles;
    expand(k, want);
    @(negedge clk); key = k; key_load = 1;
    @(negedge clk); key_load = 0; key = rand128();
    cycles = 0;
    while (!key_ready && cycles < 50) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 10) begin failures++; $display("key_ready after %0d clocks, want 10", cycles); end
    repeat (3) @(negedge clk);          // keys must be held
    for (int i = 0; i < 11; i++) begin
      checks++;
      if (rks[i] !== want[i]) begin
        failures++; $display("round key %0d: got %h want %h", i, rks[i], want[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (key_ready) begin failures++; $display("key_ready set after reset"); end
    load_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (rks[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("A.1 round key 10"); end
    for (int n = 0; n < 5; n++) load_and_check(rand128());
    // restart: a second load four clocks into an expansion
    @(negedge clk); key = rand128(); key_load = 1;
    @(negedge clk); key_load = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (key_ready) begin failures++; $display("key_ready during expansion"); end
    load_and_check(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
