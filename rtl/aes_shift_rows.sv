// aes_shift_rows: the Shift Row transform of the 4x4 byte state.
//
// Row 0 stays as it is, row 1 rotates left by one byte, row 2 by two and row
// 3 by three, so output byte (row r, column c) is input byte (r, (c+r) mod 4).
// With the rows a b c d / e f g h / i j k l / m n o p the result is
// a b c d / f g h e / k l i j / p m n o. The step is a fixed byte permutation,
// so it synthesises to wiring with no gates: every output bit is an input bit
// moved to another position. Combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t in_state,
  output state_t out_state
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        out_state[127 - 8*(4*c + r) -: 8] = in_state[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
  end

endmodule
