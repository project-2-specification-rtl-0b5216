// sha1_ref_pkg: reference model used by the testbenches.
//
// A direct, loop-based transcription of the SHA-1 block compression of the
// standard (FIPS 180-1): expand the block to 80 words in an array, run the
// 80 steps on scalar words, add the chaining value. It shares no code with
// the RTL, so a mistake in the RTL's package does not carry over.
package sha1_ref_pkg;

  typedef logic [31:0]  u32;
  typedef logic [159:0] h160;

  function automatic u32 rl(input u32 x, input int n);
    return u32'({x, x} >> (32 - n));
  endfunction

  // 80-word message expansion of one 512-bit block.
  function automatic void expand(input logic [511:0] blk, output u32 wv [80]);
    for (int t = 0; t < 16; t++) wv[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 80; t++)
      wv[t] = rl(wv[t-3] ^ wv[t-8] ^ wv[t-14] ^ wv[t-16], 1);
  endfunction

  // One step; state packed as {a,b,c,d,e}.
  function automatic h160 step(input int t, input h160 s, input u32 wt);
    u32 a, b, c, d, e, f, k, tmp;
    {a, b, c, d, e} = s;
    if (t < 20)      begin f = (b & c) | ((~b) & d);          k = 32'h5a827999; end
    else if (t < 40) begin f = b ^ c ^ d;                     k = 32'h6ed9eba1; end
    else if (t < 60) begin f = (b & c) | (b & d) | (c & d);   k = 32'h8f1bbcdc; end
    else             begin f = b ^ c ^ d;                     k = 32'hca62c1d6; end
    tmp = rl(a, 5) + f + e + k + wt;
    return {tmp, a, rl(b, 30), c, d};
  endfunction

  function automatic h160 compress(input h160 h, input logic [511:0] blk);
    u32  wv [80];
    h160 s;
    h160 r;
    expand(blk, wv);
    s = h;
    for (int t = 0; t < 80; t++) s = step(t, s, wv[t]);
    for (int i = 0; i < 5; i++) r[32*i +: 32] = h[32*i +: 32] + s[32*i +: 32];
    return r;
  endfunction

  localparam h160 H0 = 160'h67452301_efcdab89_98badcfe_10325476_c3d2e1f0;

  function automatic logic [511:0] rand_block();
    logic [511:0] b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
    return b;
  endfunction

  // Padded single block for "abc" and its published digest.
  localparam logic [511:0] ABC_BLOCK = {32'h61626380, {14{32'h0}}, 32'h00000018};
  localparam h160          ABC_DIGEST = 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d;

  // "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq" (448 bits),
  // padded to two blocks, and its published digest.
  localparam logic [511:0] TWO_BLOCK0 = {
    32'h61626364, 32'h62636465, 32'h63646566, 32'h64656667,
    32'h65666768, 32'h66676869, 32'h6768696a, 32'h68696a6b,
    32'h696a6b6c, 32'h6a6b6c6d, 32'h6b6c6d6e, 32'h6c6d6e6f,
    32'h6d6e6f70, 32'h6e6f7071, 32'h80000000, 32'h00000000};
  localparam logic [511:0] TWO_BLOCK1 = {{15{32'h0}}, 32'h000001c0};
  localparam h160          TWO_DIGEST = 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1;

endpackage
