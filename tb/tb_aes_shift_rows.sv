// tb_aes_shift_rows: the letter example a..p (rows a b c d / e f g h /
// i j k l / m n o p must become a b c d / f g h e / k l i j / p m n o), the
// FIPS-197 round-1 example and random states against the reference.
module tb_aes_shift_rows;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  state_t in_state, out_state;

  aes_shift_rows dut (.in_state(in_state), .out_state(out_state));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input state_t s, input state_t exp);
    in_state = s;
    #1;
    checks++;
    if (out_state !== exp) begin
      failures++;
      $display("FAIL shift_rows(%032h) = %032h, expected %032h", s, out_state, exp);
    end
  endtask

  // Letters given row by row, packed column by column.
  function automatic state_t letters(input string rows);
    state_t s;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        s[127 - 8*(4*c + r) -: 8] = rows[4*r + c];
    return s;
  endfunction

  initial begin
    state_t s;
    expect_state(letters("abcdefghijklmnop"), letters("abcdfgheklijpmno"));
    expect_state(128'hd42711aee0bf98f1b8b45de51e415230,
                 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 200; i++) begin
      s = {$urandom(), $urandom(), $urandom(), $urandom()};
      expect_state(s, ref_shift_rows(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
