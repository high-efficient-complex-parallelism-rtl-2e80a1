// aes_add_round_key: the Add Round Key step, a bitwise XOR of the 128-bit
// state with a 128-bit round key. It opens the datapath (with the cipher key
// itself) and closes every loop and the final stage. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  state_t in_state,
  input  key_t   round_key,
  output state_t out_state
);

  assign out_state = in_state ^ round_key;

endmodule
