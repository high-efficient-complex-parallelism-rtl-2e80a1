// aes_ref_pkg: a behavioural AES-128 reference for the testbenches, written
// independently of the RTL. The S-box is found by walking the multiplicative
// group of GF(2^8) with the generator 3 and, in step, its inverse 0xf6 (so no
// field inversion is computed), the state is handled as a 4x4 byte matrix,
// and the key schedule is written word by word as in FIPS-197 section 5.2.
package aes_ref_pkg;

  function automatic logic [7:0] ref_rotl8(input logic [7:0] x, input int n);
    logic [15:0] d;
    d = {x, x} << n;
    return d[15:8];
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] p, q;
    if (a == 8'h00) return 8'h63;
    p = 8'h01;
    q = 8'h01;
    do begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);  // p *= 3
      q = q ^ {q[6:0], 1'b0};                           // q /= 3
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'h0};
      if (q[7]) q = q ^ 8'h09;
      if (p == a)
        return q ^ ref_rotl8(q, 1) ^ ref_rotl8(q, 2) ^ ref_rotl8(q, 3)
                 ^ ref_rotl8(q, 4) ^ 8'h63;
    end while (p != 8'h01);
    return 8'h00;
  endfunction

  function automatic logic [7:0] ref_x2(input logic [7:0] a);
    return a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
  endfunction

  typedef logic [7:0] mat_t [4][4];  // [row][col]

  function automatic mat_t to_mat(input logic [127:0] s);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[r][c] = s[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(input mat_t m);
    logic [127:0] s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[127 - 8*(4*c + r) -: 8] = m[r][c];
    return s;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = ref_sbox(s[8*i +: 8]);
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] s);
    mat_t m, o;
    m = to_mat(s);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic logic [31:0] ref_mix_col(input logic [31:0] w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {ref_x2(a0) ^ ref_x2(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ ref_x2(a1) ^ ref_x2(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ ref_x2(a2) ^ ref_x2(a3) ^ a3,
            ref_x2(a0) ^ a0 ^ a1 ^ a2 ^ ref_x2(a3)};
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] s);
    return {ref_mix_col(s[127:96]), ref_mix_col(s[95:64]),
            ref_mix_col(s[63:32]), ref_mix_col(s[31:0])};
  endfunction

  function automatic logic [7:0] ref_rcon(input int r);
    logic [7:0] c;
    c = 8'h01;
    repeat (r - 1) c = ref_x2(c);
    return c;
  endfunction

  function automatic logic [127:0] ref_next_key(input logic [127:0] k, input int r);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {ref_sbox(w3[23:16]) ^ ref_rcon(r), ref_sbox(w3[15:8]),
         ref_sbox(w3[7:0]), ref_sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // One full AES-128 encryption; states[0] is after the first key addition,
  // states[r] after round r (states[10] is the cipher text), keys[r] round key r.
  function automatic void ref_encrypt(input logic [127:0] pt, input logic [127:0] key,
                                      output logic [127:0] states [11],
                                      output logic [127:0] keys [11]);
    keys[0]   = key;
    states[0] = pt ^ key;
    for (int r = 1; r <= 10; r++) begin
      keys[r] = ref_next_key(keys[r-1], r);
      if (r < 10)
        states[r] = ref_mix_columns(ref_shift_rows(ref_sub_bytes(states[r-1]))) ^ keys[r];
      else
        states[r] = ref_shift_rows(ref_sub_bytes(states[r-1])) ^ keys[r];
    end
  endfunction

endpackage
