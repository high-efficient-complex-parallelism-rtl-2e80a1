// tb_aes_key_elongation: walks the whole FIPS-197 AES-128 key schedule for
// key 2b7e1516 28aed2a6 abf71588 09cf4f3c (round keys 1..10 printed in the
// standard, a0fafe17... to d014f9a8...), the schedule of key 000102...0f
// for its last key, and random keys against the reference.
module tb_aes_key_elongation;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  key_t  prev_key, next_key;
  byte_t rcon_in;

  aes_key_elongation dut (.prev_key(prev_key), .rcon_in(rcon_in), .next_key(next_key));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam key_t FIPS_KEYS [11] = '{
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f,
    128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00,
    128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd,
    128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f,
    128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6
  };
  localparam byte_t RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                  8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  task automatic expect_key(input key_t k, input byte_t rc, input key_t exp);
    prev_key = k;
    rcon_in  = rc;
    #1;
    checks++;
    if (next_key !== exp) begin
      failures++;
      $display("FAIL next_key(%032h, %02h) = %032h, expected %032h", k, rc, next_key, exp);
    end
  endtask

  initial begin
    key_t k;
    key_t kk;
    int   r;
    for (int i = 1; i <= 10; i++) expect_key(FIPS_KEYS[i-1], RCON[i-1], FIPS_KEYS[i]);
    // key 000102..0f: chain the DUT itself through ten steps
    kk = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i <= 10; i++) begin
      prev_key = kk;
      rcon_in  = RCON[i-1];
      #1;
      kk = next_key;
    end
    checks++;
    if (kk !== 128'h13111d7fe3944a17f307a78b4d2b30c5) begin
      failures++;
      $display("FAIL last round key of 000102..0f = %032h", kk);
    end
    for (int i = 0; i < 200; i++) begin
      k = {$urandom(), $urandom(), $urandom(), $urandom()};
      r = 1 + ($urandom() % 10);
      expect_key(k, RCON[r-1], ref_next_key(k, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
