// present_key_reg -- the 80-bit key register of one lane with its load path
// (the "KEY LOAD" function) and the key schedule.
//
// On a rising clock edge with key_load high, all 80 bits of data_i are copied
// into the register. Otherwise, when advance is high, the register steps to
// the next round key using present_key_update with the current round number.
// With neither, it holds. The round key K_i, the top 64 bits key_q[79:16], is the output.
// Copying all of data_i on key_load follows the design; the hold when a
// plaintext load is in progress is this implementation's choice, so that K1 is
// still in place when the first round runs. There is no reset: a key must be
// loaded before every block, because the register is consumed by the rounds.
module present_key_reg
  import present_pkg::*;
(
  input  logic   clk_i,
  input  logic   key_load,       // copy data_i into the key register
  input  logic   advance,        // perform one key-schedule step
  input  round_t round_count,    // round number used by the step
  input  key_t   data_i,         // 80-bit key input
  output state_t round_key_o     // K_i, the top 64 bits of the register
);

  key_t key_q, key_next;

  present_key_update u_update (
    .key_i        (key_q),
    .round_count_i(round_count),
    .key_o        (key_next)
  );

  always_ff @(posedge clk_i) begin
    if (key_load)     key_q <= data_i;
    else if (advance) key_q <= key_next;
  end

  assign round_key_o = key_q[KEY_W-1 -: BLOCK_W];

endmodule
