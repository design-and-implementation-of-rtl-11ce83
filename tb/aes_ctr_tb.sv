// aes_ctr (4 lanes, 512 bits per clock): the NIST SP 800-38A F.5.1 CTR-AES128
// example (four blocks, one data word), then random streams checked against
// the reference. Covers back-to-back words, gaps, a counter that wraps past
// 2^128 - 1 in the middle of a word, a reload of the counter together with
// data, the 10-clock latency, and decryption: feeding the ciphertext back
// through the same circuit with the same initial counter restores the data.
module aes_ctr_tb;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  localparam int LANES = 4;
  localparam int LAT   = 10;
  localparam int W     = LANES*128;
  logic          clk = 0, rst_n = 0, ctr_load = 0, in_valid = 0, out_valid;
  block_t        ctr_iv;
  logic [W-1:0]  in_data, out_data;
  round_keys_t   rks;
  logic [127:0]  key, model_ctr;
  int checks = 0, failures = 0, cycle = 0, n_out = 0, n_wrap = 0;
  logic [W-1:0] exp_q [$];
  int           t_q   [$];
  logic [W-1:0] got_q [$];

  aes_ctr #(.LANES(LANES)) dut (.clk(clk), .rst_n(rst_n), .round_keys(rks),
    .ctr_load(ctr_load), .ctr_iv(ctr_iv), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data));

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

  function automatic logic [W-1:0] model(input logic [W-1:0] d, input logic [127:0] c);
    logic [W-1:0] o;
    for (int l = 0; l < LANES; l++) begin
      logic [127:0] cl = c + 128'(l);
      o[W-1-128*l -: 128] = d[W-1-128*l -: 128] ^ encrypt(cl, key);
    end
    return o;
  endfunction

  // one data word; optionally (re)load the counter in the same cycle
  task automatic send(input logic [W-1:0] d, input bit load, input logic [127:0] iv);
    if (load) model_ctr = iv;
    if (model_ctr > ~128'(LANES - 1)) n_wrap++;
    ctr_load = load; ctr_iv = iv;
    in_valid = 1; in_data = d;
    exp_q.push_back(model(d, model_ctr)); t_q.push_back(cycle + 1);
    model_ctr = model_ctr + 128'(LANES);
    @(negedge clk);
    in_valid = 0; ctr_load = 0;
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    n_out++;
    got_q.push_back(out_data);
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      automatic logic [W-1:0] w = exp_q.pop_front();
      automatic int t = t_q.pop_front();
      if (out_data !== w) begin failures++; $display("got %h\nwant %h", out_data, w); end
      if (cycle - t != LAT - 1) begin failures++; $display("latency %0d", cycle - t + 1); end
    end
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int l = 0; l < LANES; l++) v[W-1-128*l -: 128] = rand128();
    return v;
  endfunction

  initial begin
    logic [W-1:0] pts [$];
    logic [127:0] iv;
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // SP 800-38A F.5.1 (ctr_load separately, then data)
    ctr_load = 1; ctr_iv = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff; model_ctr = ctr_iv;
    @(negedge clk); ctr_load = 0;
    send({128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
          128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710}, 0, '0);
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (got_q[0] !== {128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
                      128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee}) begin
      failures++; $display("SP 800-38A vector");
    end

    // random key; stream of words crossing the 2^128 wrap, back to back then gappy
    set_key(rand128());
    iv = ~128'h0 - 128'd9;
    got_q.delete();
    for (int n = 0; n < 30; n++) begin
      automatic logic [W-1:0] d = rand_word();
      pts.push_back(d);
      send(d, n == 0, iv);
      if (n >= 15) repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    // decrypt: the same circuit, same initial counter, on the ciphertext
    begin
      logic [W-1:0] cts [$];
      cts = got_q;
      got_q.delete();
      foreach (cts[i]) send(cts[i], i == 0, iv);
      repeat (LAT + 2) @(negedge clk);
      foreach (pts[i]) begin
        checks++;
        if (got_q[i] !== pts[i]) begin failures++; $display("round trip word %0d", i); end
      end
    end
    checks++;
    if (n_out != 61 || n_wrap == 0) begin failures++; $display("outputs %0d wraps %0d", n_out, n_wrap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
