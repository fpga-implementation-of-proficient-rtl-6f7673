// present_ref_pkg -- reference model of PRESENT-80 encryption for the
// testbenches, written independently of the RTL.
//
// The S-box is a case table, the permutation is written as the 4 x 16 bit
// transposition (output bit 16*(i mod 4) + i/4 takes input bit i), and whole
// encryptions are computed round by round in software. Known-answer vectors
// of the PRESENT standard check the model itself.
package present_ref_pkg;

  function automatic logic [3:0] ref_sbox(input logic [3:0] x);
    case (x)
      4'h0: return 4'hC;  4'h1: return 4'h5;  4'h2: return 4'h6;  4'h3: return 4'hB;
      4'h4: return 4'h9;  4'h5: return 4'h0;  4'h6: return 4'hA;  4'h7: return 4'hD;
      4'h8: return 4'h3;  4'h9: return 4'hE;  4'hA: return 4'hF;  4'hB: return 4'h8;
      4'hC: return 4'h4;  4'hD: return 4'h7;  4'hE: return 4'h1;  default: return 4'h2;
    endcase
  endfunction

  function automatic logic [63:0] ref_sbox_layer(input logic [63:0] s);
    logic [63:0] r;
    for (int j = 0; j < 16; j++) r[4*j +: 4] = ref_sbox(s[4*j +: 4]);
    return r;
  endfunction

  function automatic logic [63:0] ref_player(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[16 * (i % 4) + i / 4] = s[i];
    return r;
  endfunction

  function automatic logic [63:0] ref_round(input logic [63:0] s, input logic [63:0] k);
    return ref_player(ref_sbox_layer(s ^ k));
  endfunction

  function automatic logic [79:0] ref_key_update(input logic [79:0] k, input logic [4:0] i);
    logic [79:0] r;
    r = (k << 61) | (k >> 19);
    r[79:76] = ref_sbox(r[79:76]);
    r[19:15] = r[19:15] ^ i;
    return r;
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] s;
    logic [79:0] k;
    s = pt;
    k = key;
    for (int i = 1; i <= 31; i++) begin
      s = ref_round(s, k[79:16]);
      k = ref_key_update(k, 5'(i));
    end
    return s ^ k[79:16];
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic logic [79:0] rand80();
    return {16'($urandom()), $urandom(), $urandom()};
  endfunction

endpackage
