// aes_complex_parallel_encrypt: AES-128 encryption with the "complex
// parallelism" organisation, fully unrolled and purely combinational.
//
// The plain text is first XORed with the cipher key (initial Add Round Key).
// Nine loops (aes_round) follow in series; each substitutes the state with
// four parallel Substitution Byte units, shifts the rows, mixes the columns
// with four parallel Mix Column units and adds its own round key, which its
// key path computes from the previous one. The final stage (aes_final_round)
// substitutes, shifts and adds round key 10 to give the cipher text.
//
// Interface: 128-bit plain_text and cipher_key in, 128-bit cipher_text out,
// 384 signal pins and no clock; the cipher text settles one long
// combinational path after the inputs change. The intermediate signals carry
// the names of the reference simulation: text_in1 (after the initial key
// addition), text_out[1..9] (after each loop) and key[1..10] (round keys).
// Unrolling without pipeline registers follows the design's pin count and
// single-path delay figure; the byte order is FIPS-197's (see aes_pkg).
module aes_complex_parallel_encrypt
  import aes_pkg::*;
(
  input  state_t plain_text,
  input  key_t   cipher_key,
  output state_t cipher_text
);

  state_t text_in1;
  state_t text_out [NUM_LOOPS + 1];   // index 0 is text_in1
  key_t   key      [NUM_ROUNDS + 1];  // index 0 is the cipher key

  aes_add_round_key u_initial_add_round_key (
    .in_state  (plain_text),
    .round_key (cipher_key),
    .out_state (text_in1)
  );

  assign text_out[0] = text_in1;
  assign key[0]      = cipher_key;

  for (genvar i = 1; i <= NUM_LOOPS; i++) begin : g_loop
    aes_round #(.ROUND(i)) u_round (
      .in_state  (text_out[i-1]),
      .prev_key  (key[i-1]),
      .out_state (text_out[i]),
      .round_key (key[i])
    );
  end

  aes_final_round u_final_round (
    .in_state  (text_out[NUM_LOOPS]),
    .prev_key  (key[NUM_LOOPS]),
    .out_state (cipher_text),
    .round_key (key[NUM_ROUNDS])
  );

endmodule
