// Single-rail AES-128 reference model for the testbenches (FIPS-197),
// written independently of the design: the S-box is computed as a^254 in
// GF(2^8) followed by the affine transform.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] inv = 8'h01, s;
    for (int i = 0; i < 254; i++) inv = gmul(inv, a);
    if (a == 0) inv = 0;
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  // Byte k of a block is bits [127-8k -: 8].
  function automatic logic [127:0] sub_shift(logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int rr = 0; rr < 4; rr++)
        r[127 - 8*(4*c + rr) -: 8] = sbox(s[127 - 8*(4*((c + rr) % 4) + rr) -: 8]);
    return r;
  endfunction

  function automatic logic [127:0] mix(logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a [4];
      for (int rr = 0; rr < 4; rr++) a[rr] = s[127 - 8*(4*c + rr) -: 8];
      for (int rr = 0; rr < 4; rr++)
        r[127 - 8*(4*c + rr) -: 8] = gmul(a[rr], 8'h02) ^ gmul(a[(rr+1)%4], 8'h03)
                                   ^ a[(rr+2)%4] ^ a[(rr+3)%4];
    end
    return r;
  endfunction

  function automatic logic [127:0] next_key(logic [127:0] k, logic [7:0] rcon);
    logic [31:0] w [4];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {sbox(w[3][23:16]) ^ rcon, sbox(w[3][15:8]), sbox(w[3][7:0]), sbox(w[3][31:24])};
    w[0] ^= t;
    w[1] ^= w[0];
    w[2] ^= w[1];
    w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s = pt ^ key, k = key;
    logic [7:0] rcon = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, rcon);
      s = sub_shift(s);
      if (r != 10) s = mix(s);
      s ^= k;
      rcon = gmul(rcon, 8'h02);
    end
    return s;
  endfunction

endpackage
