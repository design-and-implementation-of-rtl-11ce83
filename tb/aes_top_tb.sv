// End-to-end test of aes_top at its default configuration (4 lanes).
//
// The key goes in through key_load and the key schedule; nothing below
// drives round keys directly. The test encrypts the NIST SP 800-38A F.5.1
// CTR example, decrypts the FIPS-197 Appendix B/C.1 ciphertexts on the block
// decryptor, then streams random data through counter mode while the block
// decryptor works on the CTR keystream blocks at the same time, reloads the
// key, crosses the 2^128 counter wrap, and decrypts a CTR stream with the
// same circuit. Each mechanism is counted and must occur at least once.
module aes_top_tb;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  localparam int LANES = 4;
  localparam int LAT   = 10;
  localparam int W     = LANES*128;

  logic         clk = 0, rst_n = 0;
  logic         key_load = 0, key_ready;
  block_t       key;
  logic         ctr_load = 0, ctr_in_valid = 0, ctr_out_valid;
  block_t       ctr_iv;
  logic [W-1:0] ctr_in_data, ctr_out_data;
  logic         dec_in_valid = 0, dec_out_valid;
  block_t       dec_in_block, dec_out_block;

  aes_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_key_load = 0, n_ctr_load = 0, n_ctr_word = 0, n_back_to_back = 0, n_wrap = 0;
  int n_dec_block = 0, n_concurrent = 0, n_round_trip = 0;

  logic [127:0] cur_key, model_ctr;
  logic [W-1:0]  cexp_q [$], cgot_q [$];
  int            ct_q   [$];
  logic [127:0]  dexp_q [$];
  int            dt_q   [$];
  int            last_ctr_issue = -10;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // ---- stimulus helpers (all drive on the falling edge) ----
  task automatic load_key(input logic [127:0] k);
    int n = 0;
    key = k; key_load = 1; cur_key = k;
    @(negedge clk); key_load = 0;
    while (!key_ready && n < 100) begin @(negedge clk); n++; end
    checks++;
    if (n != 10) fail($sformatf("key_ready after %0d clocks", n));
    n_key_load++;
  endtask

  function automatic logic [W-1:0] ctr_model(input logic [W-1:0] d, input logic [127:0] c);
    logic [W-1:0] o;
    for (int l = 0; l < LANES; l++) o[W-1-128*l -: 128] = d[W-1-128*l -: 128] ^ encrypt(c + 128'(l), cur_key);
    return o;
  endfunction

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int l = 0; l < LANES; l++) v[W-1-128*l -: 128] = rand128();
    return v;
  endfunction

  // drive one cycle: optional CTR word (with optional counter load) and optional block to decrypt
  task automatic drive(input bit cv, input logic [W-1:0] d, input bit load, input logic [127:0] iv,
                       input bit dv, input logic [127:0] db);
    if (load) begin model_ctr = iv; n_ctr_load++; end
    ctr_load = load; ctr_iv = iv;
    ctr_in_valid = cv; ctr_in_data = d;
    dec_in_valid = dv; dec_in_block = db;
    if (cv) begin
      if (model_ctr > ~128'(LANES - 1)) n_wrap++;
      if (cycle == last_ctr_issue) n_back_to_back++;
      last_ctr_issue = cycle + 1;
      cexp_q.push_back(ctr_model(d, model_ctr)); ct_q.push_back(cycle + 1);
      model_ctr = model_ctr + 128'(LANES);
      n_ctr_word++;
    end
    if (dv) begin
      dexp_q.push_back(decrypt(db, cur_key)); dt_q.push_back(cycle + 1);
      n_dec_block++;
      if (cv) n_concurrent++;
    end
    @(negedge clk);
    ctr_in_valid = 0; ctr_load = 0; dec_in_valid = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // ---- scoreboards ----
  always @(posedge clk) if (rst_n) begin
    if (ctr_out_valid) begin
      checks += 2;
      cgot_q.push_back(ctr_out_data);
      if (cexp_q.size() == 0) fail("unexpected CTR output");
      else begin
        automatic logic [W-1:0] w = cexp_q.pop_front();
        automatic int t = ct_q.pop_front();
        if (ctr_out_data !== w) fail($sformatf("CTR data %h", ctr_out_data));
        if (cycle - t != LAT - 1) fail($sformatf("CTR latency %0d", cycle - t + 1));
      end
    end
    if (dec_out_valid) begin
      checks += 2;
      if (dexp_q.size() == 0) fail("unexpected decrypt output");
      else begin
        automatic logic [127:0] w = dexp_q.pop_front();
        automatic int t = dt_q.pop_front();
        if (dec_out_block !== w) fail($sformatf("decrypt got %h want %h", dec_out_block, w));
        if (cycle - t != LAT - 1) fail($sformatf("decrypt latency %0d", cycle - t + 1));
      end
    end
  end

  initial begin
    logic [127:0] iv;
    logic [W-1:0] pts [$], cts [$];
    idle(2);
    rst_n = 1;
    idle(1);

    // 1. SP 800-38A F.5.1 CTR-AES128 and FIPS-197 Appendix B decryption
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    drive(1, {128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
              128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710},
          1, 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff, 1, 128'h3925841d02dc09fbdc118597196a0b32);
    idle(LAT + 2);
    checks++;
    if (cgot_q[0] !== {128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
                       128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee})
      fail("SP 800-38A vector");

    // 2. FIPS-197 C.1 key and ciphertext on the decryptor
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    drive(0, '0, 0, '0, 1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    idle(LAT + 2);

    // 3. random key; a stream across the counter wrap, decryptor busy in parallel
    load_key(rand128());
    iv = ~128'h0 - 128'd6;
    cgot_q.delete();
    for (int n = 0; n < 40; n++) begin
      automatic logic [W-1:0] d = rand_word();
      pts.push_back(d);
      drive(1, d, n == 0, iv, n % 2 == 0, encrypt(rand128(), cur_key));
      if (n >= 24 && ($urandom_range(0, 2) == 0)) idle(1);
    end
    idle(LAT + 2);

    // 4. decrypt that CTR stream with the same circuit and initial counter
    cts = cgot_q;
    cgot_q.delete();
    foreach (cts[i]) drive(1, cts[i], i == 0, iv, 0, '0);
    idle(LAT + 2);
    foreach (pts[i]) begin
      checks++;
      if (cgot_q[i] !== pts[i]) fail($sformatf("CTR round trip word %0d", i));
      else n_round_trip++;
    end

    // ---- coverage of the mechanisms ----
    checks++;
    if (cexp_q.size() != 0 || dexp_q.size() != 0) fail("outputs missing");
    begin
      int cnt [8];
      string nm [8];
      cnt = '{n_key_load, n_ctr_load, n_ctr_word, n_back_to_back, n_wrap, n_dec_block, n_concurrent, n_round_trip};
      nm  = '{"key loads", "counter loads", "CTR words", "back-to-back words", "counter wraps",
              "decrypted blocks", "CTR+decrypt same cycle", "CTR round trips"};
      for (int i = 0; i < 8; i++) begin
        $display("%-24s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) fail({nm[i], " never happened"});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
