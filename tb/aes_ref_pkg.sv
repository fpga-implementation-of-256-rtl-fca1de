// aes_ref_pkg: behavioural AES-256 reference model for the testbenches.
//
// Written independently of the RTL: the S-box is computed from its
// definition (inverse in GF(2^8) by exhaustive search, then the affine map)
// instead of being read from a table, GF multiplication is a plain
// shift-and-add loop, and the state is handled as a 4x4 byte array
// st[row][col]. Byte i of a 128-bit block (bits [127-8i -: 8]) is
// st[i%4][i/4].
package aes_ref_pkg;

  typedef logic [7:0] st_t [4][4];

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] gf_inv(logic [7:0] a);
    if (a == 8'h00) return 8'h00;
    for (int b = 1; b < 256; b++)
      if (gf_mul(a, 8'(b)) == 8'h01) return 8'(b);
    return 8'h00;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int n);
    return 8'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] b = gf_inv(x);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    for (int x = 0; x < 256; x++)
      if (sbox(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i%4][i/4] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i%4][i/4];
    return b;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] b, bit inverse);
    st_t s = to_st(b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        s[r][c] = inverse ? inv_sbox(s[r][c]) : sbox(s[r][c]);
    return from_st(s);
  endfunction

  // Rotate row r left by r (or right by r when inverse) one step at a time.
  function automatic logic [127:0] shift_rows(logic [127:0] b, bit inverse);
    st_t s = to_st(b);
    logic [7:0] t;
    for (int r = 1; r < 4; r++)
      for (int k = 0; k < r; k++) begin
        if (!inverse) begin
          t = s[r][0];
          s[r][0] = s[r][1]; s[r][1] = s[r][2]; s[r][2] = s[r][3]; s[r][3] = t;
        end else begin
          t = s[r][3];
          s[r][3] = s[r][2]; s[r][2] = s[r][1]; s[r][1] = s[r][0]; s[r][0] = t;
        end
      end
    return from_st(s);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] b, bit inverse);
    logic [7:0] m [4] = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    st_t s = to_st(b);
    st_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) o[r][c] ^= gf_mul(m[(k - r + 4) % 4], s[k][c]);
      end
    return from_st(o);
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // Round key r (0..14) of a 256-bit key, by the standard word recurrence.
  function automatic logic [127:0] round_key(logic [255:0] key, int r);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 8; i++) w[i] = key[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = sub_word({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = gf_mul(rc, 8'h02);
      end else if (i % 8 == 4) begin
        t = sub_word(t);
      end
      w[i] = w[i-8] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [255:0] key, logic [127:0] pt);
    logic [127:0] s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 14; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r < 14) s = mix_columns(s, 0);
      s ^= round_key(key, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [255:0] key, logic [127:0] ct);
    logic [127:0] s = ct ^ round_key(key, 14);
    for (int r = 13; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= round_key(key, r);
      if (r > 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [255:0] rand256();
    return {rand128(), rand128()};
  endfunction

endpackage
