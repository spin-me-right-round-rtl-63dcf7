// rs_pkg: shared arithmetic for the rotational-symmetry AES S-boxes.
//
// The AES S-box is an inversion x^254 in GF(2^8) (polynomial basis, modulus
// x^8+x^4+x^3+x+1, alpha = 2) followed by the AES affine map. Written in a
// normal basis (beta, beta^2, ..., beta^128) a power map commutes with a
// rotation of the coordinate vector, so every output bit is the same 8-to-1
// function S* of a rotated input. This package derives everything the S-box
// datapaths need from the choice of beta, at elaboration time:
//   * p2n   : polynomial -> normal basis conversion matrix,
//   * n2p   : normal -> polynomial conversion followed by the AES affine map,
//   * S*    : 256-entry truth table of coordinate 0 of x^e in the normal basis.
// Bit i of a normal-basis vector is the coefficient of beta^(2^i); moving bit
// i to bit i+1 (and bit 7 to bit 0) squares the field element, the opposite
// rotation takes its square root.
// The normal-basis elements (145, 133, 205) follow the document. The n2p
// matrices are computed here rather than copied, so that they agree with the
// field arithmetic by construction.
package rs_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [7:0][7:0] mat8_t;   // mat[i] = row i: output bit i = ^(mat[i] & x)

  // Normal-basis generators used by the three S-box variants.
  localparam byte_t BETA_PARALLEL = 8'd145;  // byte-parallel load
  localparam byte_t BETA_SERIAL   = 8'd133;  // bit-serial load
  localparam byte_t BETA_MASKED   = 8'd205;  // masked, x^26 / x^49 split

  localparam byte_t AES_AFFINE_C = 8'h63;

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t r = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  function automatic byte_t gf_pow(byte_t a, int unsigned e);
    byte_t r = 8'h01;
    byte_t s = a;
    for (int i = 0; i < 9; i++) begin
      if (e[i]) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t mat_apply(mat8_t m, byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++) y[i] = ^(m[i] & x);
    return y;
  endfunction

  // Columns of Q are beta^(2^i) in polynomial basis: Q * normal = polynomial.
  function automatic mat8_t n2poly_matrix(byte_t beta);
    mat8_t m = '0;
    byte_t c = beta;
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) m[i][j] = c[i];
      c = gf_mul(c, c);
    end
    return m;
  endfunction

  // Inverse of Q, found column by column by searching the preimage of each
  // polynomial unit vector.
  function automatic mat8_t p2n_matrix(byte_t beta);
    mat8_t q = n2poly_matrix(beta);
    mat8_t m = '0;
    for (int j = 0; j < 8; j++) begin
      for (int v = 0; v < 256; v++) begin
        if (mat_apply(q, byte_t'(v)) == byte_t'(1 << j)) begin
          for (int i = 0; i < 8; i++) m[i][j] = v[i];
        end
      end
    end
    return m;
  endfunction

  function automatic mat8_t aes_affine_matrix();
    mat8_t m = '0;
    for (int i = 0; i < 8; i++)
      for (int k = 4; k < 9; k++) m[i][(i + k) % 8] = 1'b1;  // b_i ^ b_i+4 ^ .. ^ b_i+7
    return m;
  endfunction

  function automatic mat8_t mat_mul(mat8_t a, mat8_t b);
    mat8_t m;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        logic acc = 1'b0;
        for (int k = 0; k < 8; k++) acc ^= a[i][k] & b[k][j];
        m[i][j] = acc;
      end
    return m;
  endfunction

  // Normal basis -> polynomial basis, then the linear part of the AES affine
  // map. The constant 0x63 is added separately (to one share only when masked).
  function automatic mat8_t n2p_matrix(byte_t beta);
    return mat_mul(aes_affine_matrix(), n2poly_matrix(beta));
  endfunction

  // Truth table of S*(v) = coordinate 0 of (x^e) in the normal basis, with
  // v the normal-basis coordinates of x.
  function automatic logic [255:0] sstar_table(byte_t beta, int unsigned e);
    logic [255:0] tt;
    mat8_t q = n2poly_matrix(beta);
    mat8_t p = p2n_matrix(beta);
    for (int v = 0; v < 256; v++) begin
      byte_t y = mat_apply(p, gf_pow(mat_apply(q, byte_t'(v)), e));
      tt[v] = y[0];
    end
    return tt;
  endfunction

  // Rotation of a normal-basis vector by one position towards bit 0: the
  // element is replaced by its square root. After k such rotations S* yields
  // coordinate k of the power map, so output bits appear in the order 0..7.
  function automatic byte_t rot1(byte_t v);
    return {v[0], v[7:1]};
  endfunction

endpackage
