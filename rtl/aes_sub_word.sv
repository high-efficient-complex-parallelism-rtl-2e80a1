// aes_sub_word: one Substitution Byte unit of the datapath, four S-boxes side
// by side on a 32-bit word.
//
// The datapath uses four of these in parallel to substitute the sixteen
// state bytes column by column, and the key path uses one more on the
// rotated last key word ("substitution byte with key"). Byte k of the word
// (bits [31-8k -: 8]) goes through its own aes_sbox. Combinational.
module aes_sub_word
  import aes_pkg::*;
(
  input  word_t in_word,
  output word_t out_word
);

  for (genvar k = 0; k < 4; k++) begin : g_sbox
    aes_sbox u_sbox (
      .in_byte  (in_word[31 - 8*k -: 8]),
      .out_byte (out_word[31 - 8*k -: 8])
    );
  end

endmodule
