// present_key_update -- PRESENT-80 key schedule step ("update" box).
//
// Combinational. From the 80-bit key register k and the number i of the round
// just performed it forms the next key register:
//   1. rotate left by 61 bit positions: k = {k[18:0], k[79:19]}
//   2. pass the top nibble k[79:76] through the S-box
//   3. XOR the 5-bit round counter i into k[19:15]
// The round key of round i is the leftmost 64 bits, k[79:16]. The three steps
// are those of the PRESENT standard for 80-bit keys; the design implemented
// here names the update box without spelling it out.
module present_key_update
  import present_pkg::*;
(
  input  key_t   key_i,          // key register holding K_i in its top 64 bits
  input  round_t round_count_i,  // i, the round being completed (1..31)
  output key_t   key_o           // key register holding K_(i+1)
);

  key_t rotated;

  always_comb begin
    rotated            = {key_i[18:0], key_i[79:19]};
    key_o              = rotated;
    key_o[79:76]       = sbox(rotated[79:76]);
    key_o[19:15]       = rotated[19:15] ^ round_count_i;
  end

endmodule
