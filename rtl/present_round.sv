// present_round -- one PRESENT round as combinational logic:
// addRoundKey (XOR with the 64-bit round key), then sBoxLayer, then pLayer.
//
// The round-iterative lane registers the output of this block once per clock,
// so one round completes in each clock cycle. The order of the three layers
// follows the cipher's algorithmic description.
module present_round
  import present_pkg::*;
(
  input  state_t state_i,      // state entering the round
  input  state_t round_key_i,  // K_i, the leftmost 64 bits of the key register
  output state_t state_o       // state leaving the round
);

  state_t keyed, substituted;

  assign keyed = state_i ^ round_key_i;

  present_sbox_layer u_sbox (.state_i(keyed),       .state_o(substituted));
  present_player     u_perm (.state_i(substituted), .state_o(state_o));

endmodule
