// prince_ref_pkg: a plain, un-optimised software model of PRINCE used by the
// testbenches as the independent reference.
//
// It follows the textbook description of the cipher: whitening with k0,
// PRINCEcore (RC0 addition, five rounds S -> M -> add, the middle layer
// S -> M' -> S^-1, five inverse rounds add -> M^-1 -> S^-1, RC11 addition),
// whitening with k0'. M = SR o M'. The state is held as a 4x4 nibble matrix
// (nibble n = row n%4, column n/4) for ShiftRows, and M' is evaluated as a
// matrix-vector product of 4x4 blocks. Decryption is modelled as the literal
// inverse of every step, not by the alpha-reflection the RTL uses.
package prince_ref_pkg;

  typedef logic [63:0] w64_t;

  function automatic logic [3:0] ref_s(logic [3:0] x);
    logic [3:0] t [16] = '{4'hB, 4'hF, 4'h3, 4'h2, 4'hA, 4'hC, 4'h9, 4'h1,
                           4'h6, 4'h7, 4'h8, 4'h0, 4'hE, 4'h5, 4'hD, 4'h4};
    return t[x];
  endfunction

  function automatic logic [3:0] ref_s_inv(logic [3:0] y);
    for (int x = 0; x < 16; x++)
      if (ref_s(4'(x)) == y) return 4'(x);
    return 4'h0;
  endfunction

  function automatic logic [3:0] nib(w64_t s, int n);
    return s[63 - 4*n -: 4];
  endfunction

  function automatic w64_t ref_sub(w64_t s, bit inv);
    w64_t o;
    for (int n = 0; n < 16; n++)
      o[63 - 4*n -: 4] = inv ? ref_s_inv(nib(s, n)) : ref_s(nib(s, n));
    return o;
  endfunction

  // Row r of the 4x4 nibble matrix rotated left by r (right by r if inv).
  function automatic w64_t ref_sr(w64_t s, bit inv);
    w64_t o;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++) begin
        int src_col = inv ? (col - row + 4) % 4 : (col + row) % 4;
        o[63 - 4*(4*col + row) -: 4] = nib(s, 4*src_col + row);
      end
    return o;
  endfunction

  // Entry (i,j) of the 4x4 matrix Mk: identity with entry (k,k) cleared.
  function automatic bit m4(int k, int i, int j);
    return (i == j) && (i != k);
  endfunction

  function automatic w64_t ref_mprime(w64_t s);
    w64_t o;
    for (int blk = 0; blk < 4; blk++) begin
      int hat = (blk == 1 || blk == 2) ? 1 : 0;
      for (int bi = 0; bi < 4; bi++)       // block row of M^
        for (int i = 0; i < 4; i++) begin  // row inside the 4x4 block
          bit acc = 0;
          for (int bj = 0; bj < 4; bj++)   // block column
            for (int j = 0; j < 4; j++)
              if (m4((bi + bj + hat) % 4, i, j))
                acc ^= s[63 - (16*blk + 4*bj + j)];
          o[63 - (16*blk + 4*bi + i)] = acc;
        end
    end
    return o;
  endfunction

  function automatic w64_t ref_rc(int i);
    w64_t rc [12] = '{
      64'h0000000000000000, 64'h13198a2e03707344, 64'ha4093822299f31d0,
      64'h082efa98ec4e6c89, 64'h452821e638d01377, 64'hbe5466cf34e90c6c,
      64'h7ef84f78fd955cb1, 64'h85840851f1ac43aa, 64'hc882d32f25323c54,
      64'h64a51195e0e3610d, 64'hd3b5a399ca0c2399, 64'hc0ac29b7c97c50dd};
    return rc[i];
  endfunction

  function automatic w64_t ref_k0p(w64_t k0);
    return {k0[0], k0[63:1]} ^ (k0 >> 63);
  endfunction

  function automatic w64_t ref_encrypt(w64_t pt, logic [127:0] key);
    w64_t k0 = key[127:64];
    w64_t k1 = key[63:0];
    w64_t x = pt ^ k0 ^ k1 ^ ref_rc(0);
    for (int i = 1; i <= 5; i++)
      x = ref_sr(ref_mprime(ref_sub(x, 0)), 0) ^ k1 ^ ref_rc(i);
    x = ref_sub(ref_mprime(ref_sub(x, 0)), 1);
    for (int i = 6; i <= 10; i++)
      x = ref_sub(ref_mprime(ref_sr(x ^ k1 ^ ref_rc(i), 1)), 1);
    return x ^ k1 ^ ref_rc(11) ^ ref_k0p(k0);
  endfunction

  function automatic w64_t ref_decrypt(w64_t ct, logic [127:0] key);
    w64_t k0 = key[127:64];
    w64_t k1 = key[63:0];
    w64_t x = ct ^ ref_k0p(k0) ^ k1 ^ ref_rc(11);
    for (int i = 10; i >= 6; i--)
      x = ref_sr(ref_mprime(ref_sub(x, 0)), 0) ^ k1 ^ ref_rc(i);
    x = ref_sub(ref_mprime(ref_sub(x, 0)), 1);
    for (int i = 5; i >= 1; i--)
      x = ref_sub(ref_mprime(ref_sr(x ^ k1 ^ ref_rc(i), 1)), 1);
    return x ^ k1 ^ ref_rc(0) ^ k0;
  endfunction

  function automatic w64_t rand64();
    return {$urandom, $urandom};
  endfunction

endpackage
