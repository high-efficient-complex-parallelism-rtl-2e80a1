// tb_aes_complex_parallel_encrypt: end-to-end test of the whole encryption
// datapath at its default size.
//
// 1. FIPS-197 Appendix B (plain text 3243f6a8..., key 2b7e1516...): the
//    cipher text 3925841d02dc09fbdc118597196a0b32, and every intermediate
//    state (text_in1, text_out[1..9]) and round key (key[1..10]) against the
//    values printed in the standard.
// 2. FIPS-197 Appendix C.1 (00112233... with key 00010203...).
// 3. Random plain texts and keys against the reference model, intermediate
//    states included.
// Each stage of the datapath (initial key addition, every loop, every key
// elongation step, the final stage) counts how often it was seen producing
// the right value; a stage never seen working counts as a failure.
module tb_aes_complex_parallel_encrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NUM_RANDOM = 200;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  state_t plain_text, cipher_text;
  key_t   cipher_key;

  aes_complex_parallel_encrypt dut (
    .plain_text  (plain_text),
    .cipher_key  (cipher_key),
    .cipher_text (cipher_text)
  );

  // seen_state[0]: initial key addition, [1..9]: loops, [10]: final stage;
  // seen_key[1..10]: key elongation steps.
  int seen_state [11];
  int seen_key   [11];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check128(input string what, input int idx, input logic [127:0] got,
                          input logic [127:0] exp, ref int seen [11]);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s[%0d] = %032h, expected %032h", what, idx, got, exp);
    end else begin
      seen[idx]++;
    end
  endtask

  // Compare the whole pipeline of intermediate values with an expected set.
  task automatic check_all(input logic [127:0] states [11], input logic [127:0] keys [11]);
    check128("text_in1", 0, dut.text_in1, states[0], seen_state);
    for (int i = 1; i <= 9; i++) begin
      check128("text_out", i, dut.text_out[i], states[i], seen_state);
      check128("key", i, dut.key[i], keys[i], seen_key);
    end
    check128("key", 10, dut.key[10], keys[10], seen_key);
    check128("cipher_text", 10, cipher_text, states[10], seen_state);
  endtask

  logic [127:0] fips_states [11];
  logic [127:0] fips_keys   [11];

  initial begin
    logic [127:0] st [11];
    logic [127:0] ks [11];
    int cycles;

    fips_states = '{
      128'h193de3bea0f4e22b9ac68d2ae9f84808,
      128'ha49c7ff2689f352b6b5bea43026a5049,
      128'haa8f5f0361dde3ef82d24ad26832469a,
      128'h486c4eee671d9d0d4de3b138d65f58e7,
      128'he0927fe8c86363c0d9b1355085b8be01,
      128'hf1006f55c1924cef7cc88b325db5d50c,
      128'h260e2e173d41b77de86472a9fdd28b25,
      128'h5a4142b11949dc1fa3e019657a8c040c,
      128'hea835cf00445332d655d98ad8596b0c5,
      128'heb40f21e592e38848ba113e71bc342d2,
      128'h3925841d02dc09fbdc118597196a0b32
    };
    fips_keys = '{
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

    // One operation: present both words and read the cipher text one clock
    // later (the datapath has no registers, so the result is ready within it).
    @(negedge clk);
    plain_text = 128'h3243f6a8885a308d313198a2e0370734;
    cipher_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(posedge clk);
    check_all(fips_states, fips_keys);

    @(negedge clk);
    plain_text = 128'h00112233445566778899aabbccddeeff;
    cipher_key = 128'h000102030405060708090a0b0c0d0e0f;
    @(posedge clk);
    checks++;
    if (cipher_text !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FAIL C.1 cipher text = %032h", cipher_text);
    end

    cycles = 0;
    for (int n = 0; n < NUM_RANDOM; n++) begin
      @(negedge clk);
      plain_text = {$urandom(), $urandom(), $urandom(), $urandom()};
      cipher_key = {$urandom(), $urandom(), $urandom(), $urandom()};
      ref_encrypt(plain_text, cipher_key, st, ks);
      @(posedge clk);
      cycles++;
      check_all(st, ks);
    end
    // One block per clock: NUM_RANDOM blocks took NUM_RANDOM clocks.
    checks++;
    if (cycles != NUM_RANDOM) begin
      failures++;
      $display("FAIL %0d blocks took %0d clocks", NUM_RANDOM, cycles);
    end

    for (int i = 0; i <= 10; i++) begin
      checks++;
      if (seen_state[i] == 0) begin
        failures++;
        $display("FAIL datapath stage %0d never produced a correct value", i);
      end
      if (i > 0) begin
        checks++;
        if (seen_key[i] == 0) begin
          failures++;
          $display("FAIL key elongation step %0d never produced a correct key", i);
        end
      end
    end
    $display("stage counts: initial add round key %0d, loops 1..9 %0d..%0d, final stage %0d, key steps %0d..%0d",
             seen_state[0], seen_state[1], seen_state[9], seen_state[10], seen_key[1], seen_key[10]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
