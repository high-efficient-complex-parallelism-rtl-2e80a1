// aes_final_round: the output stage after the nine loops.
//
// Four parallel Substitution Byte units, the Shift Row block and a last Add
// Round Key with round key 10, which the key path (Substitution Byte with key
// and key elongation) derives from round key 9. There is no Mix Column here,
// as the AES-128 final round prescribes. Combinational.
module aes_final_round
  import aes_pkg::*;
(
  input  state_t in_state,   // state after the ninth loop
  input  key_t   prev_key,   // round key 9
  output state_t out_state,  // cipher text
  output key_t   round_key   // round key 10
);

  state_t sub_byte_out;
  state_t shift_row_out;

  for (genvar c = 0; c < 4; c++) begin : g_sub
    aes_sub_word u_sub_word (
      .in_word  (in_state[127 - 32*c -: 32]),
      .out_word (sub_byte_out[127 - 32*c -: 32])
    );
  end

  aes_shift_rows u_shift_rows (
    .in_state  (sub_byte_out),
    .out_state (shift_row_out)
  );

  aes_key_elongation u_key_elongation (
    .prev_key (prev_key),
    .rcon_in  (rcon(NUM_ROUNDS)),
    .next_key (round_key)
  );

  aes_add_round_key u_add_round_key (
    .in_state  (shift_row_out),
    .round_key (round_key),
    .out_state (out_state)
  );

endmodule
