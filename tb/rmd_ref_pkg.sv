// rmd_ref_pkg: plain behavioural RIPEMD-160 reference for the testbenches.
//
// A straightforward software-style model, written without the pipeline or
// the pre-computation of the RTL: the step function in its textbook form, a
// full compression function, and a byte-level hash with its own padding. Its
// tables are kept here separately from the RTL package, and the testbenches
// check the model itself against published RIPEMD-160 test vectors.
package rmd_ref_pkg;

  typedef bit [31:0] u32;
  typedef u32 st5_t [5];   // a, b, c, d, e  (or h0..h4)
  typedef u32 blk16_t [16];

  const int RL [80] = '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,
                        7,4,13,1,10,6,15,3,12,0,9,5,2,14,11,8,
                        3,10,14,4,9,15,8,1,2,7,0,6,13,11,5,12,
                        1,9,11,10,0,8,12,4,13,3,7,15,14,5,6,2,
                        4,0,5,9,7,12,2,10,14,1,3,8,11,6,15,13};
  const int RR [80] = '{5,14,7,0,9,2,11,4,13,6,15,8,1,10,3,12,
                        6,11,3,7,0,13,5,10,14,15,8,12,4,9,1,2,
                        15,5,1,3,7,14,6,9,11,8,12,2,10,0,4,13,
                        8,6,4,1,3,11,15,0,5,12,2,13,9,7,10,14,
                        12,15,10,4,1,5,8,7,6,2,13,14,0,3,9,11};
  const int SL [80] = '{11,14,15,12,5,8,7,9,11,13,14,15,6,7,9,8,
                        7,6,8,13,11,9,7,15,7,12,15,9,11,7,13,12,
                        11,13,6,7,14,9,13,15,14,8,13,6,5,12,7,5,
                        11,12,14,15,14,15,9,8,9,14,5,6,8,6,5,12,
                        9,15,5,11,6,8,13,12,5,12,13,14,11,8,5,6};
  const int SR [80] = '{8,9,9,11,13,15,15,5,7,7,8,11,14,14,12,6,
                        9,13,15,7,12,8,9,11,7,7,12,7,6,15,13,11,
                        9,7,15,11,8,6,6,14,12,13,5,14,13,13,7,5,
                        15,5,8,11,14,14,6,14,6,9,12,9,12,5,15,8,
                        8,5,12,9,12,5,14,6,8,13,6,5,15,13,11,11};
  const u32 KL [5] = '{32'h0, 32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC, 32'hA953FD4E};
  const u32 KR [5] = '{32'h50A28BE6, 32'h5C4DD124, 32'h6D703EF3, 32'h7A6D76E9, 32'h0};
  const st5_t H0 = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};

  function automatic u32 rotl(u32 x, int s);
    return (x << s) | (x >> (32 - s));
  endfunction

  function automatic u32 f(int j, u32 x, u32 y, u32 z);
    if (j < 16) return x ^ y ^ z;
    if (j < 32) return (x & y) | (~x & z);
    if (j < 48) return (x | ~y) ^ z;
    if (j < 64) return (x & z) | (y & ~z);
    return x ^ (y | ~z);
  endfunction

  // One operation j (0..79) of the left (right = 0) or right (right = 1) line.
  function automatic st5_t step(st5_t v, blk16_t x, int j, bit right);
    st5_t o;
    u32 t;
    int rnd = j / 16;
    if (!right)
      t = rotl(v[0] + f(j, v[1], v[2], v[3]) + x[RL[j]] + KL[rnd], SL[j]) + v[4];
    else
      t = rotl(v[0] + f(79 - j, v[1], v[2], v[3]) + x[RR[j]] + KR[rnd], SR[j]) + v[4];
    o[0] = v[4];
    o[1] = t;
    o[2] = v[1];
    o[3] = rotl(v[2], 10);
    o[4] = v[3];
    return o;
  endfunction

  // The 16 operations of round rnd (0..4) of one line.
  function automatic st5_t round16(st5_t v, blk16_t x, int rnd, bit right);
    st5_t o = v;
    for (int j = 16 * rnd; j < 16 * rnd + 16; j++) o = step(o, x, j, right);
    return o;
  endfunction

  function automatic st5_t combine(st5_t h, st5_t l, st5_t r);
    st5_t o;
    o[0] = h[1] + l[2] + r[3];
    o[1] = h[2] + l[3] + r[4];
    o[2] = h[3] + l[4] + r[0];
    o[3] = h[4] + l[0] + r[1];
    o[4] = h[0] + l[1] + r[2];
    return o;
  endfunction

  function automatic st5_t compress(st5_t h, blk16_t x);
    st5_t l = h, r = h;
    for (int rnd = 0; rnd < 5; rnd++) begin
      l = round16(l, x, rnd, 1'b0);
      r = round16(r, x, rnd, 1'b1);
    end
    return combine(h, l, r);
  endfunction

  // Pads a byte message into 16-word blocks.
  function automatic void pad(byte unsigned msg[$], ref blk16_t blocks[$]);
    byte unsigned m[$] = msg;
    longint unsigned bits = 64'(msg.size()) * 8;
    blk16_t b;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 0; i < 8; i++) m.push_back(8'(bits >> (8 * i)));
    blocks.delete();
    for (int k = 0; k < m.size() / 64; k++) begin
      for (int w = 0; w < 16; w++)
        b[w] = {m[64*k + 4*w + 3], m[64*k + 4*w + 2], m[64*k + 4*w + 1], m[64*k + 4*w]};
      blocks.push_back(b);
    end
  endfunction

  function automatic bit [159:0] digest_of(st5_t h);
    bit [159:0] d;
    for (int i = 0; i < 5; i++)
      d[159 - 32*i -: 32] = {h[i][7:0], h[i][15:8], h[i][23:16], h[i][31:24]};
    return d;
  endfunction

  function automatic bit [159:0] hash(byte unsigned msg[$]);
    blk16_t blocks[$];
    st5_t h = H0;
    pad(msg, blocks);
    foreach (blocks[k]) h = compress(h, blocks[k]);
    return digest_of(h);
  endfunction

  function automatic void str2bytes(string s, ref byte unsigned q[$]);
    q.delete();
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

endpackage
