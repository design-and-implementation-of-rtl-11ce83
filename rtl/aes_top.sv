// AES-128 core with counter-mode streaming and a block decryptor.
//
// One aes_key_schedule expands the cipher key (key_load, then key_ready ten
// clocks later) and feeds the same eleven round keys to two datapaths that
// run side by side:
//  * aes_ctr: counter mode over LANES = 4 parallel encryption pipelines,
//    512 bits per clock, latency 10 clocks; the same port encrypts and
//    decrypts a stream given its initial counter (ctr_load/ctr_iv).
//  * aes_decrypt: the inverse cipher on single 128-bit blocks, one per clock,
//    latency 10 clocks, whose InvMixColumns is built from the advanced-xtime
//    multipliers.
// All S-boxes in the design are composite-field S-boxes. Data may be sent
// only while key_ready is high; the key must not be reloaded while blocks
// are in flight. Reset is synchronous and active low.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 key_load,
  input  block_t               key,
  output logic                 key_ready,
  input  logic                 ctr_load,
  input  block_t               ctr_iv,
  input  logic                 ctr_in_valid,
  input  logic [LANES*128-1:0] ctr_in_data,
  output logic                 ctr_out_valid,
  output logic [LANES*128-1:0] ctr_out_data,
  input  logic                 dec_in_valid,
  input  block_t               dec_in_block,
  output logic                 dec_out_valid,
  output block_t               dec_out_block
);
  round_keys_t round_keys;

  aes_key_schedule u_keys (
    .clk(clk), .rst_n(rst_n), .key_load(key_load), .key(key),
    .round_keys(round_keys), .key_ready(key_ready)
  );

  aes_ctr #(.LANES(LANES)) u_ctr (
    .clk(clk), .rst_n(rst_n), .round_keys(round_keys),
    .ctr_load(ctr_load), .ctr_iv(ctr_iv),
    .in_valid(ctr_in_valid), .in_data(ctr_in_data),
    .out_valid(ctr_out_valid), .out_data(ctr_out_data)
  );

  aes_decrypt u_dec (
    .clk(clk), .rst_n(rst_n), .round_keys(round_keys),
    .in_valid(dec_in_valid), .in_block(dec_in_block),
    .out_valid(dec_out_valid), .out_block(dec_out_block)
  );

  a_ctr_keyed: assert property (@(posedge clk) disable iff (!rst_n) ctr_in_valid |-> key_ready);
  a_dec_keyed: assert property (@(posedge clk) disable iff (!rst_n) dec_in_valid |-> key_ready);
endmodule
