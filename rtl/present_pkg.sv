// present_pkg: constants and pure functions of the PRESENT-80 lightweight block
// cipher shared by the scan-chain encryption blocks.
//
// PRESENT works on a 64-bit block (N) with 31 rounds. One round is: XOR the
// 64-bit round key, pass every nibble through a 4-bit S-box, then permute the
// bits (bit i moves to 16*i mod 63, bit 63 stays). The 80-bit key register
// is updated between rounds by rotating it left by 61, passing the top nibble
// through the S-box and XORing the 5-bit round counter into bits 19..15; the
// round key is the top 64 bits of the key register. This package holds those steps and their
// inverses so that the round unit and the key expansion can run either way.
//
// The block size N=64 and the latency D=32 clock cycles (31 full rounds plus the
// final key addition) are the figures the scan-cipher scheme is built on;
// the 80-bit key length is this design's choice (PRESENT also has a 128-bit
// key variant).
package present_pkg;

  localparam int unsigned N      = 64;  // block size in bits, one scan segment
  localparam int unsigned KEY_W  = 80;  // PRESENT-80 key register
  localparam int unsigned D      = 32;  // clock cycles per block operation
  localparam int unsigned RND_W  = 5;   // width of the round-step index 0..D-1

  typedef logic [N-1:0]     block_t;
  typedef logic [KEY_W-1:0] key_t;

  // S-box and its inverse as nibble tables: entry x sits at bits 4x+3..4x.
  localparam logic [63:0] SBOX_TAB     = 64'h2174_8FE3_DA09_B65C;
  localparam logic [63:0] INV_SBOX_TAB = 64'hA970_364B_D21C_8FE5;

  function automatic logic [3:0] sbox(input logic [3:0] x);
    return SBOX_TAB[4*x +: 4];
  endfunction

  function automatic logic [3:0] inv_sbox(input logic [3:0] x);
    return INV_SBOX_TAB[4*x +: 4];
  endfunction

  function automatic block_t s_layer(input block_t x);
    block_t y;
    for (int i = 0; i < N / 4; i++) y[4*i +: 4] = sbox(x[4*i +: 4]);
    return y;
  endfunction

  function automatic block_t inv_s_layer(input block_t x);
    block_t y;
    for (int i = 0; i < N / 4; i++) y[4*i +: 4] = inv_sbox(x[4*i +: 4]);
    return y;
  endfunction

  // Bit i moves to position 16*i mod 63 (bit 63 stays in place).
  function automatic int unsigned p_pos(input int unsigned i);
    return (i == N - 1) ? i : (16 * i) % (N - 1);
  endfunction

  function automatic block_t p_layer(input block_t x);
    block_t y;
    for (int unsigned i = 0; i < N; i++) y[p_pos(i)] = x[i];
    return y;
  endfunction

  function automatic block_t inv_p_layer(input block_t x);
    block_t y;
    for (int unsigned i = 0; i < N; i++) y[i] = x[p_pos(i)];
    return y;
  endfunction

  // Key-register update that turns the key state of round i into that of
  // round i+1 (i counts from 1).
  function automatic key_t key_update(input key_t k, input logic [RND_W-1:0] i);
    key_t r;
    r = {k[18:0], k[79:19]};               // rotate left by 61
    r[79:76] = sbox(r[79:76]);
    r[19:15] = r[19:15] ^ i;
    return r;
  endfunction

  // Inverse of key_update: key state of round i+1 back to that of round i.
  function automatic key_t key_update_inv(input key_t k, input logic [RND_W-1:0] i);
    key_t r;
    r = k;
    r[19:15] = r[19:15] ^ i;
    r[79:76] = inv_sbox(r[79:76]);
    return {r[60:0], r[79:61]};             // rotate right by 61
  endfunction

endpackage
