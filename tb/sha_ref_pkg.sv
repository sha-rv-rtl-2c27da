// Reference model used by the testbenches: a plain, loop-based FIPS 180-4
// SHA-224/256 block compression written without any of the pipelining of the
// design, plus helpers to pad short messages and to build random blocks.
package sha_ref_pkg;
  import sha_rv_pkg::*;

  typedef word_t state_t [8];
  typedef word_t block_t [16];

  function automatic word_t r_rotr(word_t x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // Message schedule word W[j] of a block, j in 0..63.
  function automatic word_t ref_w(block_t m, int j);
    word_t w [64];
    for (int i = 0; i < 16; i++) w[i] = m[i];
    for (int i = 16; i < 64; i++)
      w[i] = (r_rotr(w[i-2], 17) ^ r_rotr(w[i-2], 19) ^ (w[i-2] >> 10)) + w[i-7]
           + (r_rotr(w[i-15], 7) ^ r_rotr(w[i-15], 18) ^ (w[i-15] >> 3)) + w[i-16];
    return w[j];
  endfunction

  function automatic state_t ref_compress(state_t h, block_t m);
    word_t w [64];
    word_t a, b, c, d, e, f, g, hh, t1, t2;
    state_t o;
    for (int i = 0; i < 64; i++) w[i] = ref_w(m, i);
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4]; f = h[5]; g = h[6]; hh = h[7];
    for (int i = 0; i < 64; i++) begin
      t1 = hh + (r_rotr(e, 6) ^ r_rotr(e, 11) ^ r_rotr(e, 25)) + ((e & f) ^ (~e & g)) + K_TABLE[i] + w[i];
      t2 = (r_rotr(a, 2) ^ r_rotr(a, 13) ^ r_rotr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
      hh = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
    end
    o[0] = h[0] + a; o[1] = h[1] + b; o[2] = h[2] + c; o[3] = h[3] + d;
    o[4] = h[4] + e; o[5] = h[5] + f; o[6] = h[6] + g; o[7] = h[7] + hh;
    return o;
  endfunction

  function automatic block_t rand_block();
    block_t m;
    for (int i = 0; i < 16; i++) m[i] = $urandom;
    return m;
  endfunction

  // The padded single block of the 3-byte message "abc".
  function automatic block_t abc_block();
    block_t m;
    for (int i = 0; i < 16; i++) m[i] = '0;
    m[0]  = 32'h61626380;
    m[15] = 32'h00000018;
    return m;
  endfunction

  function automatic state_t iv_of(bit is256);
    state_t s;
    for (int i = 0; i < 8; i++) s[i] = is256 ? IV256[i] : IV224[i];
    return s;
  endfunction
endpackage
