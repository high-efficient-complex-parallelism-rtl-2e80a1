// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128
// "complex parallelism" encryption datapath.
//
// The state is a packed 128-bit vector in the FIPS-197 byte order: byte 0 of
// the block sits in bits [127:120], and byte n is row (n mod 4), column
// (n div 4) of the 4x4 state matrix. A column is therefore the 32-bit word
// [127-32c -: 32] with row 0 in its top byte. Round constants and the number
// of serial loops follow the AES-128 standard, which the published test
// vector (plain text 3243f6a8..., key 2b7e1516..., cipher 3925841d...) pins
// down; the field arithmetic uses the AES polynomial x^8+x^4+x^3+x+1.
package aes_pkg;

  localparam int unsigned BLOCK_BITS = 128;
  localparam int unsigned KEY_BITS   = 128;

  // Nine full loops run in series, followed by the final stage.
  localparam int unsigned NUM_LOOPS  = 9;
  localparam int unsigned NUM_ROUNDS = NUM_LOOPS + 1;

  typedef logic [7:0]            byte_t;
  typedef logic [31:0]           word_t;
  typedef logic [BLOCK_BITS-1:0] state_t;
  typedef logic [KEY_BITS-1:0]   key_t;

  // Multiply by x modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t acc;
    byte_t p;
    acc = '0;
    p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // Round constant of key-expansion step r (r = 1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // Column c (0..3) of a state.
  function automatic word_t get_col(input state_t s, input int unsigned c);
    return s[127 - 32*c -: 32];
  endfunction

endpackage
