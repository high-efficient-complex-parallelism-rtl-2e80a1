// aes_key_elongation: one step of the AES-128 key expansion ("key
// elongation"), turning round key i-1 into round key i.
//
// The last word w3 of the previous key is rotated one byte left
// ([z3,z2,z1,z0] -> [z2,z1,z0,z3]), passed through the Substitution Byte with
// key unit (aes_sub_word) and XORed with the round constant in its top byte.
// The four new words then follow the chain
//   w4 = w0 ^ t, w5 = w1 ^ w4, w6 = w2 ^ w5, w7 = w3 ^ w6.
// The round constant comes in as a port so the same block serves every
// step; its values (01, 02, 04, ... 36) are the AES-128 standard ones.
// Combinational.
module aes_key_elongation
  import aes_pkg::*;
(
  input  key_t   prev_key,
  input  byte_t  rcon_in,
  output key_t   next_key
);

  word_t w [4];
  word_t rot_w3;
  word_t sub_w3;
  word_t t;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = prev_key[127 - 32*i -: 32];
    rot_w3 = {w[3][23:0], w[3][31:24]};
  end

  aes_sub_word u_sub_key (
    .in_word  (rot_w3),
    .out_word (sub_w3)
  );

  always_comb begin
    t = sub_w3 ^ {rcon_in, 24'h000000};
    next_key[127:96] = w[0] ^ t;
    next_key[95:64]  = w[1] ^ w[0] ^ t;
    next_key[63:32]  = w[2] ^ w[1] ^ w[0] ^ t;
    next_key[31:0]   = w[3] ^ w[2] ^ w[1] ^ w[0] ^ t;
  end

endmodule
