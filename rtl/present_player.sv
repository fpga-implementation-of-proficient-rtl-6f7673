// present_player -- PRESENT linear layer: a fixed 64-bit bit permutation.
//
// Purely combinational wiring: input bit i appears at output bit P(i), with
// P(i) = 16*i mod 63 for i < 63 and P(63) = 63 (PRESENT standard). In
// hardware it costs no gates; it only routes wires.
module present_player
  import present_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int unsigned i = 0; i < BLOCK_W; i++) begin
      state_o[perm_dest(i)] = state_i[i];
    end
  end

endmodule
