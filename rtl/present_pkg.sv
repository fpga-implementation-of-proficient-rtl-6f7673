// present_pkg -- sizes, types and the S-box table shared by the PRESENT-80
// encryption lanes.
//
// PRESENT is a 64-bit substitution-permutation block cipher with 31 rounds.
// This build uses the 80-bit key variant, as the design it implements does.
// The 4-bit S-box, the bit permutation and the key-schedule rotation are those
// of the PRESENT specification (ISO/IEC 29192-2); the design being implemented
// names these layers but does not print their tables, so they are taken from
// the standard.
package present_pkg;

  localparam int unsigned BLOCK_W  = 64;  // state / plaintext / ciphertext width
  localparam int unsigned KEY_W    = 80;  // key register width
  localparam int unsigned ROUNDS   = 31;  // rounds; K32 is the post-whitening key
  localparam int unsigned RC_W     = $clog2(ROUNDS + 1);  // round counter width: 5
  localparam int unsigned NIBBLES  = BLOCK_W / 4;

  typedef logic [BLOCK_W-1:0] state_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [RC_W-1:0]    round_t;
  typedef logic [3:0]         nibble_t;

  // PRESENT S-box, S[x] for x = 0..15 (entry 0 is the rightmost nibble).
  localparam logic [63:0] SBOX_TABLE = 64'h2174_8FE3_DA09_B65C;

  function automatic nibble_t sbox(input nibble_t x);
    return SBOX_TABLE[4*x +: 4];
  endfunction

  // Destination of state bit i in the permutation layer:
  // P(i) = 16*i mod 63 for i < 63, and P(63) = 63.
  function automatic int unsigned perm_dest(input int unsigned i);
    return (i == BLOCK_W - 1) ? i : (16 * i) % (BLOCK_W - 1);
  endfunction

endpackage
