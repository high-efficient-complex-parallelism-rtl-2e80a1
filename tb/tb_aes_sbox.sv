// tb_aes_sbox: exhaustive test of the byte S-box. All 256 inputs are
// compared with the reference S-box (aes_ref_pkg), and a few entries with
// values from the published AES table.
module tb_aes_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  byte_t in_byte, out_byte;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_byte(input byte_t a, input byte_t exp);
    in_byte = a;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", a, out_byte, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) expect_byte(byte_t'(i), ref_sbox(byte_t'(i)));
    expect_byte(8'h00, 8'h63);
    expect_byte(8'h01, 8'h7c);
    expect_byte(8'h53, 8'hed);
    expect_byte(8'h19, 8'hd4);
    expect_byte(8'hff, 8'h16);
    expect_byte(8'h1e, 8'h72);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
