// present_ref_pkg: reference model of PRESENT-80 for the testbenches, written
// directly from the cipher's definition (table S-box, bit-by-bit permutation,
// full list of round keys) and independent of the RTL package. Also holds the
// published PRESENT-80 test vectors.
package present_ref_pkg;

  typedef bit [63:0] blk_t;
  typedef bit [79:0] k80_t;

  localparam bit [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                   4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic bit [3:0] ref_sbox_inv(bit [3:0] y);
    for (int v = 0; v < 16; v++) if (SB[v] == y) return 4'(v);
    return 4'h0;
  endfunction

  // Round keys K1..K32 (index 1..32).
  function automatic void ref_round_keys(k80_t key, output blk_t rk [33]);
    k80_t k = key;
    for (int i = 1; i <= 32; i++) begin
      rk[i] = k[79:16];
      if (i < 32) begin
        k = (k << 61) | (k >> 19);
        k[79:76] = SB[k[79:76]];
        k[19:15] ^= 5'(i);
      end
    end
    rk[0] = '0;
  endfunction

  function automatic blk_t ref_perm(blk_t x, bit inv);
    blk_t y = '0;
    for (int i = 0; i < 64; i++) begin
      int j = (i == 63) ? 63 : (i * 16) % 63;
      if (!inv) y[j] = x[i];
      else      y[i] = x[j];
    end
    return y;
  endfunction

  function automatic blk_t ref_encrypt(blk_t pt, k80_t key);
    blk_t rk [33];
    blk_t s = pt;
    ref_round_keys(key, rk);
    for (int r = 1; r <= 31; r++) begin
      s ^= rk[r];
      for (int n = 0; n < 16; n++) s[4*n +: 4] = SB[s[4*n +: 4]];
      s = ref_perm(s, 1'b0);
    end
    return s ^ rk[32];
  endfunction

  function automatic blk_t ref_decrypt(blk_t ct, k80_t key);
    blk_t rk [33];
    blk_t s = ct;
    ref_round_keys(key, rk);
    s ^= rk[32];
    for (int r = 31; r >= 1; r--) begin
      s = ref_perm(s, 1'b1);
      for (int n = 0; n < 16; n++) s[4*n +: 4] = ref_sbox_inv(s[4*n +: 4]);
      s ^= rk[r];
    end
    return s;
  endfunction

  // Published test vectors of PRESENT-80: {key, plaintext, ciphertext}.
  localparam k80_t TV_KEY [4] = '{80'h0, 80'h0, {80{1'b1}}, {80{1'b1}}};
  localparam blk_t TV_PT  [4] = '{64'h0, {64{1'b1}}, 64'h0, {64{1'b1}}};
  localparam blk_t TV_CT  [4] = '{64'h5579C1387B228445, 64'hA112FFC72F68417B,
                                  64'hE72C46C0F5945049, 64'h3333DCD3213210D2};

endpackage
