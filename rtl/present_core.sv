// present_core -- one round-iterative PRESENT-80 encryption lane.
//
// A 64-bit state register, an 80-bit key register and a 5-bit round counter.
// Operation, all on rising edges of clk_i:
//   * key_load high: the 80-bit data_i is copied into the key register.
//   * data_load high: data_i[63:0] is copied into the state register and the
//     round counter is set to 1. This starts an encryption; no reset is
//     needed for the datapath.
//   * both low, block in flight: one round per clock. With the round counter
//     at i the state becomes pLayer(sBoxLayer(state ^ K_i)), the key register
//     steps to K_(i+1) and the counter increments, wrapping from 31 to 0.
//   * When the counter reads 0 (all 31 rounds done, K32 in the key register)
//     the next edge stores state ^ K32, the ciphertext, in data_o and
//     done_o is high for the following clock. Without a new load on that
//     edge the counter moves to 1 and the lane rests until the next load.
// Latency: data_o holds the ciphertext after the 32nd rising edge following
// the edge that loaded the plaintext. The rounds use up the key register, so
// a key is loaded before every block. Key and plaintext may be loaded in the
// same clock (key_load and data_load both high, the plaintext being
// data_i[63:0]), and that load may fall on the edge that stores the previous
// ciphertext, so blocks can follow each other every 32 clocks.
//
// Following the design: the two load strobes, the counter starting at 1 and
// passing 31 -> 0 -> 1, the 32-clock latency and the absence of a datapath
// reset. This implementation's own choices: the registered data_o, which
// holds its value until the next ciphertext; the done_o pulse; the lane
// resting between blocks instead of cycling on; the output capture
// overlapping the next load; a key load on its own abandoning a block in
// flight (no done_o for it); the active-low reset rst_ni, which clears only
// the counter and the control flags; and loads freezing the counter and the
// register not being loaded.
module present_core
  import present_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,         // asynchronous, active low; control flags only
  input  logic   key_load,       // load data_i as the 80-bit key
  input  logic   data_load,      // load data_i[63:0] as plaintext, start
  input  key_t   data_i,         // 80-bit data / key input
  output state_t data_o,         // last ciphertext, held until the next one
  output logic   done_o,         // one-clock pulse: data_o has just been written
  output round_t round_counter   // current round number
);

  logic   advance;               // perform one round this clock
  logic   capture;               // store the ciphertext this clock
  logic   busy_q;                // a block is in flight
  state_t round_key;
  state_t state_q;
  round_t rc_q;

  assign advance = busy_q && !key_load && !data_load;
  assign capture = busy_q && rc_q == '0;

  present_key_reg u_key (
    .clk_i      (clk_i),
    .key_load   (key_load),
    .advance    (advance),
    .round_count(rc_q),
    .data_i     (data_i),
    .round_key_o(round_key)
  );

  present_state_reg u_state (
    .clk_i    (clk_i),
    .data_load(data_load),
    .advance  (advance),
    .round_key(round_key),
    .data_i   (data_i[BLOCK_W-1:0]),
    .state_o  (state_q)
  );

  // Round counter and block-in-flight bookkeeping.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rc_q   <= '0;
      busy_q <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= capture;
      if (data_load) begin
        rc_q   <= round_t'(1);
        busy_q <= 1'b1;
      end else if (key_load) begin
        busy_q <= 1'b0;  // finishes the block at round 0, abandons it before
      end else if (advance) begin
        rc_q <= rc_q + round_t'(1);
        if (rc_q == '0) busy_q <= 1'b0;
      end
    end
  end

  // Post-whitening with K32 into the output register.
  always_ff @(posedge clk_i) begin
    if (capture) data_o <= state_q ^ round_key;
  end

  assign round_counter = rc_q;

  // A ciphertext is only announced 32 clocks after its plaintext load.
  // done_o set by edge n is sampled high at edge n + 1, hence 33.
  a_latency : assert property (
    @(posedge clk_i) disable iff (!rst_ni) done_o |-> $past(data_load, 33)
  ) else $error("done_o other than 32 clocks after data_load");

endmodule
