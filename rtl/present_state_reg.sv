// present_state_reg -- the 64-bit state register of one lane with its load
// path (the "DATA LOAD" function) and the round datapath that feeds it.
//
// On a rising clock edge with data_load high, data_i (the 64 rightmost bits
// of the lane's 80-bit input) is copied into the state register. Otherwise, when advance is
// high, the register takes the output of one PRESENT round applied to its
// present contents with round_key; this is the register between successive
// rounds of the round-iterative flow. With neither, it holds. No reset, as in
// the design: loading a plaintext is what starts an encryption.
module present_state_reg
  import present_pkg::*;
(
  input  logic   clk_i,
  input  logic   data_load,      // copy data_i[63:0] into the state
  input  logic   advance,        // perform one round
  input  state_t round_key,      // K_i for the round performed
  input  state_t data_i,         // plaintext
  output state_t state_o         // state register contents
);

  state_t state_q, state_next;

  present_round u_round (
    .state_i    (state_q),
    .round_key_i(round_key),
    .state_o    (state_next)
  );

  always_ff @(posedge clk_i) begin
    if (data_load)    state_q <= data_i;
    else if (advance) state_q <= state_next;
  end

  assign state_o = state_q;

endmodule
