// prince_pkg: constants and types shared by the PRINCE datapath and controllers.
//
// PRINCE is a 64-bit block cipher with a 128-bit key k = k0 || k1. All 64-bit
// words in this design are written with nibble 0 (the first hex digit of the
// usual test-vector notation) in bits [63:60] and nibble 15 in bits [3:0]; bit
// i of the cipher specification (0 = leftmost) is bit [63-i] of a logic [63:0].
//
// The package holds the 4-bit S-box and its inverse, the ShiftRows nibble
// permutation and its inverse, the twelve round constants RC0..RC11 and alpha
// (the constant that turns encryption into decryption), and the round-step
// numbering used by the iterative controller. The S-box follows the cipher's
// own table; the permutations and constants are those of the PRINCE cipher
// specification, which the design relies on but does not restate in full.
package prince_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  nibble_t;

  // Round step counter. The controller walks one step per clock:
  //   0      whitening and first S-box layer          (STEP_INIT)
  //   1..5   forward rounds R1..R5                     (STEP_FWD)
  //   6      middle M' layer                           (STEP_MID)
  //   7..11  backward rounds R6'..R10'                 (STEP_BWD)
  //   12     last inverse S-box layer, RC11, combinational output (STEP_FINAL)
  typedef logic [3:0] step_t;
  localparam step_t STEP_INIT     = 4'd0;
  localparam step_t STEP_FWD_LAST = 4'd5;
  localparam step_t STEP_MID      = 4'd6;
  localparam step_t STEP_BWD_LAST = 4'd11;
  localparam step_t STEP_FINAL    = 4'd12;
  localparam int unsigned CYCLES_PER_BLOCK = 12;

  // Which units of the round are active, and in which order they are chained.
  typedef enum logic [2:0] {
    MODE_INIT,   // add key/constant, S
    MODE_FWD,    // M', SR, add key/constant, S
    MODE_MID,    // M' only
    MODE_BWD,    // S^-1, add key/constant, SR^-1, M'
    MODE_FINAL   // S^-1, add key/constant
  } round_mode_e;

  localparam nibble_t SBOX [16] = '{
    4'hB, 4'hF, 4'h3, 4'h2, 4'hA, 4'hC, 4'h9, 4'h1,
    4'h6, 4'h7, 4'h8, 4'h0, 4'hE, 4'h5, 4'hD, 4'h4
  };
  localparam nibble_t SBOX_INV [16] = '{
    4'hB, 4'h7, 4'h3, 4'h2, 4'hF, 4'hD, 4'h8, 4'h9,
    4'hA, 4'h6, 4'h4, 4'h0, 4'h5, 4'hE, 4'hC, 4'h1
  };

  // Output nibble i of SR is input nibble SR_PERM[i]; likewise for SR^-1.
  localparam int unsigned SR_PERM [16] = '{
    0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11
  };
  localparam int unsigned SR_INV_PERM [16] = '{
    0, 13, 10, 7, 4, 1, 14, 11, 8, 5, 2, 15, 12, 9, 6, 3
  };

  localparam word_t RC [12] = '{
    64'h0000000000000000, 64'h13198a2e03707344,
    64'ha4093822299f31d0, 64'h082efa98ec4e6c89,
    64'h452821e638d01377, 64'hbe5466cf34e90c6c,
    64'h7ef84f78fd955cb1, 64'h85840851f1ac43aa,
    64'hc882d32f25323c54, 64'h64a51195e0e3610d,
    64'hd3b5a399ca0c2399, 64'hc0ac29b7c97c50dd
  };

  // RC[i] ^ RC[11-i] == ALPHA for every i.
  localparam word_t ALPHA = 64'hc0ac29b7c97c50dd;

  // Map a controller step to the round mode and the round-constant index.
  function automatic round_mode_e step_mode(step_t s);
    if (s == STEP_INIT)          return MODE_INIT;
    else if (s <= STEP_FWD_LAST) return MODE_FWD;
    else if (s == STEP_MID)      return MODE_MID;
    else if (s <= STEP_BWD_LAST) return MODE_BWD;
    else                         return MODE_FINAL;
  endfunction

  function automatic logic [3:0] step_rc_index(step_t s);
    if (s <= STEP_FWD_LAST)      return s;           // RC0..RC5
    else if (s <= STEP_BWD_LAST) return s - 4'd1;    // RC6..RC10
    else                         return 4'd11;       // RC11
  endfunction

  // Key derivation: k0' = (k0 >>> 1) ^ (k0 >> 63).
  function automatic word_t k0_prime(word_t k0);
    return {k0[0], k0[63:1]} ^ {63'd0, k0[63]};
  endfunction

endpackage
