// aes_round: one "loop" of the complex-parallelism datapath.
//
// The state passes four Substitution Byte units working in parallel (one per
// column), the Shift Row block, four Mix Column units in parallel and the Add
// Round Key block. Beside it the key path (Substitution Byte with key and key
// elongation) derives this loop's round key from the previous one, so each
// loop carries both the state and the key on to the next. Nine of these run
// in series. ROUND (1..9) selects the round constant of the key step.
// Both outputs are combinational functions of the inputs.
module aes_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
) (
  input  state_t in_state,   // state entering the loop
  input  key_t   prev_key,   // round key ROUND-1
  output state_t out_state,  // state leaving the loop
  output key_t   round_key   // round key ROUND, used here and passed on
);

  state_t sub_byte_out;
  state_t shift_row_out;
  state_t mix_col_out;

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

  for (genvar c = 0; c < 4; c++) begin : g_mix
    aes_mix_column u_mix_column (
      .in_col  (shift_row_out[127 - 32*c -: 32]),
      .out_col (mix_col_out[127 - 32*c -: 32])
    );
  end

  aes_key_elongation u_key_elongation (
    .prev_key (prev_key),
    .rcon_in  (rcon(ROUND)),
    .next_key (round_key)
  );

  aes_add_round_key u_add_round_key (
    .in_state  (mix_col_out),
    .round_key (round_key),
    .out_state (out_state)
  );

endmodule
