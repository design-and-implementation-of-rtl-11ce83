// AES-128 encryption pipeline: one block per clock, latency NR = 10 clocks.
//
// The input block is XORed with round key 0 and passed through rounds 1..10
// (aes_enc_round, the tenth with FINAL = 1, i.e. without MixColumns). A
// register follows every round, so ten blocks can be in flight; in_valid
// travels alongside in a matching valid pipeline. A block accepted on one
// rising edge appears on out_block with out_valid high ten edges later.
// round_keys must be stable while blocks are in flight. The register after
// every round is this design's choice: the source unrolls the rounds and
// shows per-round outputs but does not state a pipeline depth. Only the
// valid bits are reset (synchronous, active low).
module aes_encrypt
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
  block_t        stage_q [NR+1];   // stage_q[r] holds round r's result
  logic [NR:0]   valid_q;

  assign first      = in_block ^ round_keys[0];
  assign valid_q[0] = in_valid;

  for (genvar r = 1; r <= NR; r++) begin : g_round
    block_t rin, rout;
    assign rin = (r == 1) ? first : stage_q[r-1];
    aes_enc_round #(.FINAL(r == NR)) u_round (.state_in(rin), .round_key(round_keys[r]), .state_out(rout));
    always_ff @(posedge clk) stage_q[r] <= rout;
    always_ff @(posedge clk) begin
      if (!rst_n) valid_q[r] <= 1'b0;
      else        valid_q[r] <= valid_q[r-1];
    end
  end

  assign out_block = stage_q[NR];
  assign out_valid = valid_q[NR];
endmodule
