// tb_aes_round: one loop of the datapath. Two instances, loop 1 and loop 9
// (different round constants), are checked with the FIPS-197 Appendix B
// values (state 193de3be... with the cipher key gives a49c7ff2... and round
// key a0fafe17...; state ea835cf0... with round key 8 gives eb40f21e... and
// round key ac7766f3...), then with random inputs against the reference.
module tb_aes_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  state_t in_state, out_state1, out_state9;
  key_t   prev_key, round_key1, round_key9;

  aes_round #(.ROUND(1)) dut1 (.in_state(in_state), .prev_key(prev_key),
                               .out_state(out_state1), .round_key(round_key1));
  aes_round #(.ROUND(9)) dut9 (.in_state(in_state), .prev_key(prev_key),
                               .out_state(out_state9), .round_key(round_key9));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check128(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %032h, expected %032h", what, got, exp);
    end
  endtask

  initial begin
    state_t s;
    key_t   k;
    in_state = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    prev_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    check128("loop 1 state", out_state1, 128'ha49c7ff2689f352b6b5bea43026a5049);
    check128("loop 1 key",   round_key1, 128'ha0fafe1788542cb123a339392a6c7605);
    in_state = 128'hea835cf00445332d655d98ad8596b0c5;
    prev_key = 128'head27321b58dbad2312bf5607f8d292f;
    #1;
    check128("loop 9 state", out_state9, 128'heb40f21e592e38848ba113e71bc342d2);
    check128("loop 9 key",   round_key9, 128'hac7766f319fadc2128d12941575c006e);
    for (int i = 0; i < 100; i++) begin
      s = {$urandom(), $urandom(), $urandom(), $urandom()};
      k = {$urandom(), $urandom(), $urandom(), $urandom()};
      in_state = s;
      prev_key = k;
      #1;
      check128("loop 1 key",   round_key1, ref_next_key(k, 1));
      check128("loop 1 state", out_state1,
               ref_mix_columns(ref_shift_rows(ref_sub_bytes(s))) ^ ref_next_key(k, 1));
      check128("loop 9 key",   round_key9, ref_next_key(k, 9));
      check128("loop 9 state", out_state9,
               ref_mix_columns(ref_shift_rows(ref_sub_bytes(s))) ^ ref_next_key(k, 9));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
