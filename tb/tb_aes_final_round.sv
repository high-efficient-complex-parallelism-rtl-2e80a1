// tb_aes_final_round: the output stage. FIPS-197 Appendix B: state
// eb40f21e... with round key 9 (ac7766f3...) gives cipher text 3925841d...
// and round key 10 (d014f9a8...); the substituted state is e9098972... and
// its row-shifted form e9317db5.... Then random inputs against the reference.
module tb_aes_final_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  state_t in_state, out_state;
  key_t   prev_key, round_key;

  aes_final_round dut (.in_state(in_state), .prev_key(prev_key),
                       .out_state(out_state), .round_key(round_key));

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
    in_state = 128'heb40f21e592e38848ba113e71bc342d2;
    prev_key = 128'hac7766f319fadc2128d12941575c006e;
    #1;
    check128("sub byte out",  dut.sub_byte_out,  128'he9098972cb31075f3d327d94af2e2cb5);
    check128("shift row out", dut.shift_row_out, 128'he9317db5cb322c723d2e895faf090794);
    check128("cipher text",   out_state,         128'h3925841d02dc09fbdc118597196a0b32);
    check128("key 10",        round_key,         128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int i = 0; i < 100; i++) begin
      s = {$urandom(), $urandom(), $urandom(), $urandom()};
      k = {$urandom(), $urandom(), $urandom(), $urandom()};
      in_state = s;
      prev_key = k;
      #1;
      check128("key 10",      round_key, ref_next_key(k, 10));
      check128("cipher text", out_state, ref_shift_rows(ref_sub_bytes(s)) ^ ref_next_key(k, 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
