// plfsr_ref_pkg: bit-serial reference models for the parallel LFSR testbenches.
//
// These compute the same quantities as the RTL by the slow, obvious route and
// share no code with it: the CRC is produced one message bit per step by a
// conventional serial Galois register (the circuit the parallel design
// replaces), and products with T are formed diagonal by diagonal.  Vectors
// use the RTL's element order: bit i is element i, element 0 being the
// coefficient of s^(n-1).  Polynomials are given as in CRC tables (bit k is
// the coefficient of s^k, leading term implied).
package plfsr_ref_pkg;

  typedef logic [63:0] word_t;

  // Serial CRC register in ordinary bit order (bit k = coefficient of s^k):
  // one message bit per step, feedback = top bit XOR input bit.
  function automatic word_t serial_crc(int n, word_t poly, word_t start,
                                       const ref bit msg[$]);
    word_t r, mask;
    bit fb;
    mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    r = start & mask;
    foreach (msg[k]) begin
      fb = r[n-1] ^ msg[k];
      r  = (r << 1) & mask;
      if (fb) r ^= poly & mask;
    end
    return r;
  endfunction

  // Ordinary bit order <-> element order (reverse the n low bits).
  function automatic word_t rev(int n, word_t w);
    word_t y;
    y = '0;
    for (int i = 0; i < n; i++) y[n-1-i] = w[i];
    return y;
  endfunction

  // x = T * xt with T[i][j] = v_{j-i}, v_k = tvec[n-1-k]: sum over diagonals k.
  function automatic word_t t_mul(int n, word_t tvec, word_t xt);
    word_t x;
    x = '0;
    for (int k = 0; k < n; k++)
      if (tvec[n-1-k])
        for (int i = 0; i + k < n; i++) x[i] ^= xt[i+k];
    return x;
  endfunction

  // Random n-bit word.
  function automatic word_t rand_word(int n);
    word_t w;
    w = {$urandom(), $urandom()};
    if (n < 64) w &= (64'd1 << n) - 1;
    return w;
  endfunction

endpackage
