// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL: the AES S-box by brute-force inverse search in GF(2^8) followed by
// the FIPS-197 affine map, and a plain byte-oriented AES-128 encryption.
// Block and key are 128-bit vectors with AES byte 0 in bits [127:120].
package tb_ref_pkg;

  function automatic logic [7:0] ref_xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = ref_xtime(a);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 0;
    logic [7:0] s;
    for (int c = 1; c < 256; c++)
      if (ref_mul(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [127:0] ref_aes128(logic [127:0] pt, logic [127:0] key);
    logic [7:0] st [16];
    logic [7:0] k  [16];
    logic [7:0] t  [16];
    logic [7:0] rc = 8'h01;
    logic [127:0] out;
    for (int i = 0; i < 16; i++) begin
      st[i] = pt[127-8*i -: 8];
      k[i]  = key[127-8*i -: 8];
    end
    for (int i = 0; i < 16; i++) st[i] ^= k[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) st[i] = ref_sbox(st[i]);
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[4*c+row] = st[4*((c+row)%4)+row];
      st = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0 = st[4*c], a1 = st[4*c+1], a2 = st[4*c+2], a3 = st[4*c+3];
          st[4*c]   = ref_xtime(a0) ^ ref_xtime(a1) ^ a1 ^ a2 ^ a3;
          st[4*c+1] = a0 ^ ref_xtime(a1) ^ ref_xtime(a2) ^ a2 ^ a3;
          st[4*c+2] = a0 ^ a1 ^ ref_xtime(a2) ^ ref_xtime(a3) ^ a3;
          st[4*c+3] = ref_xtime(a0) ^ a0 ^ a1 ^ a2 ^ ref_xtime(a3);
        end
      begin
        logic [7:0] w [4];
        w[0] = ref_sbox(k[13]) ^ rc; w[1] = ref_sbox(k[14]);
        w[2] = ref_sbox(k[15]);      w[3] = ref_sbox(k[12]);
        for (int i = 0; i < 4; i++) k[i] ^= w[i];
        for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
        rc = ref_xtime(rc);
      end
      for (int i = 0; i < 16; i++) st[i] ^= k[i];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = st[i];
    return out;
  endfunction

  // Element with normal-basis coordinates v (bit i = coefficient of
  // beta^(2^i)) in polynomial basis.
  function automatic logic [7:0] ref_from_nb(logic [7:0] beta, logic [7:0] v);
    logic [7:0] r = 0, b = beta;
    for (int i = 0; i < 8; i++) begin
      if (v[i]) r ^= b;
      b = ref_mul(b, b);
    end
    return r;
  endfunction

  // Normal-basis coordinates of x^e, for x given by normal-basis coordinates,
  // found by exhaustive search.
  function automatic logic [7:0] ref_power_nb(logic [7:0] beta, logic [7:0] v, int e);
    logic [7:0] x = ref_from_nb(beta, v), y = 8'h01, w = 0;
    for (int i = 0; i < e; i++) y = ref_mul(y, x);
    for (int c = 0; c < 256; c++)
      if (ref_from_nb(beta, 8'(c)) == y) w = 8'(c);
    return w;
  endfunction

endpackage
