// AES-128 key schedule with one expansion unit, iterated over ten clocks.
//
// A pulse on key_load (sampled on a rising clock edge) stores the cipher key
// as round key 0, drops key_ready and starts the expansion. On each of the
// next ten clock edges the single aes_key_expand unit derives round key i
// from round key i-1, with Rcon advanced by xtime each step. key_ready rises
// on the edge that writes round key 10, i.e. ten clocks after the load edge,
// and all eleven keys are then held until the next key_load. A key_load
// during an expansion restarts it. The keys are computed once per cipher key
// and shared by every encryption and decryption pipeline, so both directions
// can use the ordinary round keys. Reset (synchronous, active low) clears
// only the control state; the key registers need no reset because nothing
// reads them while key_ready is low.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key,
  output round_keys_t round_keys,
  output logic        key_ready
);
  typedef enum logic {KS_IDLE, KS_EXPAND} ks_state_e;

  ks_state_e   state;
  logic [3:0]  idx;       // index of the round key written next
  byte_t       rc;        // Rcon for that step
  block_t      next_key;

  aes_key_expand u_expand (.key_in(round_keys[idx - 4'd1]), .rcon(rc), .key_out(next_key));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= KS_IDLE;
      idx       <= 4'd1;
      rc        <= 8'h01;
      key_ready <= 1'b0;
    end else if (key_load) begin
      state         <= KS_EXPAND;
      idx           <= 4'd1;
      rc            <= 8'h01;
      key_ready     <= 1'b0;
      round_keys[0] <= key;
    end else if (state == KS_EXPAND) begin
      round_keys[idx] <= next_key;
      rc              <= {rc[6:0], 1'b0} ^ (rc[7] ? 8'h1b : 8'h00);
      idx             <= idx + 4'd1;
      if (idx == 4'(NR)) begin
        state     <= KS_IDLE;
        key_ready <= 1'b1;
      end
    end
  end
endmodule
