// present_sbox_layer -- PRESENT non-linear layer: the 4-bit S-box applied to
// all 16 nibbles of the 64-bit state in parallel.
//
// Purely combinational. Nibble j of the output is S(nibble j of the input),
// nibble 0 being bits [3:0]. Sixteen parallel S-boxes follow the cipher
// description; the S-box table itself comes from the PRESENT standard.
module present_sbox_layer
  import present_pkg::*;
(
  input  state_t state_i,   // state after addRoundKey
  output state_t state_o    // substituted state
);

  always_comb begin
    for (int j = 0; j < NIBBLES; j++) begin
      state_o[4*j +: 4] = sbox(state_i[4*j +: 4]);
    end
  end

endmodule
