// tb_aes_mix_column: published MixColumns test columns (db135345 -> 8e4da1bc,
// f20a225c -> 9fdc589d, d4d4d4d5 -> d5d5d7d6, 2d26314c -> 4d7ebdf8, the
// fixed points 01010101 and c6c6c6c6, and the FIPS-197 round-1 column
// d4bf5d30 -> 046681e5) plus random columns against the reference.
module tb_aes_mix_column;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t in_col, out_col;

  aes_mix_column dut (.in_col(in_col), .out_col(out_col));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_col(input word_t w, input word_t exp);
    in_col = w;
    #1;
    checks++;
    if (out_col !== exp) begin
      failures++;
      $display("FAIL mix_column(%08h) = %08h, expected %08h", w, out_col, exp);
    end
  endtask

  initial begin
    word_t w;
    expect_col(32'hdb135345, 32'h8e4da1bc);
    expect_col(32'hf20a225c, 32'h9fdc589d);
    expect_col(32'h01010101, 32'h01010101);
    expect_col(32'hc6c6c6c6, 32'hc6c6c6c6);
    expect_col(32'hd4d4d4d5, 32'hd5d5d7d6);
    expect_col(32'h2d26314c, 32'h4d7ebdf8);
    expect_col(32'hd4bf5d30, 32'h046681e5);
    for (int i = 0; i < 200; i++) begin
      w = $urandom();
      expect_col(w, ref_mix_col(w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
