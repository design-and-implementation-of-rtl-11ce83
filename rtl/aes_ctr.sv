// AES-128 counter mode (CM), LANES blocks per clock.
//
// A 128-bit counter is loaded with the initial value by ctr_load. Each
// accepted data word (in_valid) holds LANES 128-bit blocks, block 0 in the
// most significant bits. Lane l encrypts counter + l in its own aes_encrypt
// pipeline, and the counter then advances by LANES, so consecutive blocks of
// the stream see consecutive counter values. The data word waits in a
// ten-stage delay line matching the cipher latency and is XORed with the
// keystream; the result appears with out_valid ten clocks after in_valid.
// Encryption and decryption are the same operation, so the receiver uses
// this same circuit with the same initial counter. The four parallel lanes
// (512 bits per step) follow the source; the counter width, its wrap modulo
// 2^128 and the lane order are this design's choices. ctr_load and in_valid
// in the same cycle: the data uses the newly loaded value. Reset (synchronous,
// active low) clears the counter and the valid pipeline.
module aes_ctr
  import aes_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  round_keys_t          round_keys,
  input  logic                 ctr_load,
  input  block_t               ctr_iv,
  input  logic                 in_valid,
  input  logic [LANES*128-1:0] in_data,
  output logic                 out_valid,
  output logic [LANES*128-1:0] out_data
);
  block_t               ctr_q, ctr_cur;
  logic [LANES*128-1:0] keystream;
  logic [LANES-1:0]     lane_valid;
  logic [LANES*128-1:0] data_q [NR];

  assign ctr_cur = ctr_load ? ctr_iv : ctr_q;

  always_ff @(posedge clk) begin
    if (!rst_n)        ctr_q <= '0;
    else if (in_valid) ctr_q <= ctr_cur + block_t'(LANES);
    else               ctr_q <= ctr_cur;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    aes_encrypt u_aes (
      .clk       (clk),
      .rst_n     (rst_n),
      .round_keys(round_keys),
      .in_valid  (in_valid),
      .in_block  (ctr_cur + block_t'(l)),
      .out_valid (lane_valid[l]),
      .out_block (keystream[(LANES-l)*128-1 -: 128])
    );
  end

  // data delay line, NR stages to match the cipher latency
  always_ff @(posedge clk) begin
    data_q[0] <= in_data;
    for (int i = 1; i < NR; i++) data_q[i] <= data_q[i-1];
  end

  assign out_valid = lane_valid[0];
  assign out_data  = data_q[NR-1] ^ keystream;

  // all lanes run in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) lane_valid == {LANES{lane_valid[0]}});
endmodule
