// aes_mix_column: one Mix Column unit, the AES column mix on a 32-bit column.
//
// The column (s0, s1, s2, s3), row 0 in the top byte, is multiplied by the
// fixed polynomial 03x^3 + 01x^2 + 01x + 02 modulo x^4 + 1 over GF(2^8):
//   s'0 = 2 s0 ^ 3 s1 ^ s2 ^ s3    s'1 = s0 ^ 2 s1 ^ 3 s2 ^ s3
//   s'2 = s0 ^ s1 ^ 2 s2 ^ 3 s3    s'3 = 3 s0 ^ s1 ^ s2 ^ 2 s3
// Multiplication by 2 is xtime, by 3 is xtime plus the byte itself. The
// datapath uses four of these in parallel, one per column. Combinational.
module aes_mix_column
  import aes_pkg::*;
(
  input  word_t in_col,
  output word_t out_col
);

  byte_t s [4];
  byte_t d [4];   // 2 * s

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      s[r] = in_col[31 - 8*r -: 8];
      d[r] = xtime(s[r]);
    end
    for (int r = 0; r < 4; r++) begin
      out_col[31 - 8*r -: 8] = d[r]
                              ^ d[(r + 1) % 4] ^ s[(r + 1) % 4]
                              ^ s[(r + 2) % 4]
                              ^ s[(r + 3) % 4];
    end
  end

endmodule
