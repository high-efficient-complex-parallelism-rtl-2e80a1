// aes_sbox: the Substitution Byte transform on one byte.
//
// Two steps, as the S-box is defined: the multiplicative inverse of the input
// in GF(2^8) (0 maps to 0), then the affine transformation
//   b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,  c = 8'h63.
// The inverse is computed as x^254 with an addition chain of seven squarings
// and six multiplications (x^2, x^3, x^6, x^7, x^14, x^15, ..., x^127, x^254),
// so the block is pure logic with no lookup table. Computing the inverse this
// way rather than with composite-field arithmetic or a 256-entry truth table
// is this design's own choice. Purely combinational, no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  localparam byte_t AFFINE_C = 8'h63;

  byte_t x2, x3, x6, x7, x14, x15, x30, x31, x62, x63, x126, x127, inv;

  always_comb begin
    x2   = gf_mul(in_byte, in_byte);
    x3   = gf_mul(x2, in_byte);
    x6   = gf_mul(x3, x3);
    x7   = gf_mul(x6, in_byte);
    x14  = gf_mul(x7, x7);
    x15  = gf_mul(x14, in_byte);
    x30  = gf_mul(x15, x15);
    x31  = gf_mul(x30, in_byte);
    x62  = gf_mul(x31, x31);
    x63  = gf_mul(x62, in_byte);
    x126 = gf_mul(x63, x63);
    x127 = gf_mul(x126, in_byte);
    inv  = gf_mul(x127, x127);
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      out_byte[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8]
                  ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8] ^ AFFINE_C[i];
    end
  end

endmodule
