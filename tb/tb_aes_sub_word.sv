// tb_aes_sub_word: checks that each of the four bytes of a word goes through
// its own S-box, in place, with random words and the FIPS-197 key-expansion
// example (SubWord(cf4f3c09) = 8a84eb01).
module tb_aes_sub_word;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t in_word, out_word;

  aes_sub_word dut (.in_word(in_word), .out_word(out_word));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input word_t w, input word_t exp);
    in_word = w;
    #1;
    checks++;
    if (out_word !== exp) begin
      failures++;
      $display("FAIL sub_word(%08h) = %08h, expected %08h", w, out_word, exp);
    end
  endtask

  initial begin
    word_t w;
    expect_word(32'hcf4f3c09, 32'h8a84eb01);
    expect_word(32'h00000000, 32'h63636363);
    for (int i = 0; i < 200; i++) begin
      w = $urandom();
      expect_word(w, {ref_sbox(w[31:24]), ref_sbox(w[23:16]), ref_sbox(w[15:8]), ref_sbox(w[7:0])});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
