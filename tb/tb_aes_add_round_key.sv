// tb_aes_add_round_key: the FIPS-197 first key addition (3243f6a8... XOR
// 2b7e1516... = 193de3be...) and random state/key pairs.
module tb_aes_add_round_key;
  import aes_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  state_t in_state, out_state;
  key_t   round_key;

  aes_add_round_key dut (.in_state(in_state), .round_key(round_key), .out_state(out_state));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_xor(input state_t s, input key_t k, input state_t exp);
    in_state  = s;
    round_key = k;
    #1;
    checks++;
    if (out_state !== exp) begin
      failures++;
      $display("FAIL %032h ^ %032h = %032h, expected %032h", s, k, out_state, exp);
    end
  endtask

  initial begin
    state_t s;
    key_t   k;
    expect_xor(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
               128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int i = 0; i < 200; i++) begin
      s = {$urandom(), $urandom(), $urandom(), $urandom()};
      k = {$urandom(), $urandom(), $urandom(), $urandom()};
      // bitwise reference: a bit of the result is 1 where exactly one input bit is
      expect_xor(s, k, (s | k) & ~(s & k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
