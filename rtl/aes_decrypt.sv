// AES-128 decryption (inverse cipher) pipeline: one block per clock, latency
// NR = 10 clocks.
//
// The ciphertext is XORed with round key 10, then passed through ten
// aes_dec_round stages using round keys 9 down to 0; the last stage (key 0)
// omits InvMixColumns. Each stage's InvMixColumns is the enhanced one built
// from the advanced-xtime multipliers, and its InvSubBytes the composite-field
// inverse S-box. A register follows every round; a block accepted on one
// rising edge appears with out_valid ten edges later. round_keys must be
// stable while blocks are in flight. The per-round register is this design's
// choice. Only the valid bits are reset (synchronous, active low).
module aes_decrypt
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  round_keys_t round_keys,
  input  logic        in_valid,
  input  block_t      in_block,
  output logic        out_valid,
  output block_t      out_block
);
  block_t        first;
  block_t        stage_q [NR+1];   // stage_q[r] holds the result of stage r
  logic [NR:0]   valid_q;

  assign first      = in_block ^ round_keys[NR];
  assign valid_q[0] = in_valid;

  for (genvar r = 1; r <= NR; r++) begin : g_round
    block_t rin, rout;
    assign rin = (r == 1) ? first : stage_q[r-1];
    aes_dec_round #(.FINAL(r == NR)) u_round (.state_in(rin), .round_key(round_keys[NR-r]), .state_out(rout));
    always_ff @(posedge clk) stage_q[r] <= rout;
    always_ff @(posedge clk) begin
      if (!rst_n) valid_q[r] <= 1'b0;
      else        valid_q[r] <= valid_q[r-1];
    end
  end

  assign out_block = stage_q[NR];
  assign out_valid = valid_q[NR];
endmodule
