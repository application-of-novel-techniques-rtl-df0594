// rmd_pkg: types, constants and helper functions shared by the RIPEMD-160 core.
//
// RIPEMD-160 runs two parallel lines (left and right) of five rounds with
// sixteen operations each. Every operation updates a 5-word state (a..e):
//   b_t = e + ROL_s(f(b,c,d) + a + X[r] + K),  a_t = e,  c_t = b,
//   d_t = ROL_10(c),  e_t = d.
// The tables below are the algorithm's own constants: the message word
// selection r / r', the rotation amounts s / s', the round constants K / K',
// and the initial chaining value. All words are 32 bits, and message words are
// read little-endian from the byte stream, as the algorithm defines.
package rmd_pkg;

  localparam int NROUNDS = 5;   // pipeline stages, one round each
  localparam int NOPS    = 16;  // operations per round

  typedef logic [31:0] word_t;

  // Working / chaining state. Field order a..e follows the operation equations;
  // for a chaining value, a..e hold h0..h4.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } state_t;

  // Per-block bookkeeping that travels down the pipeline next to the block
  // (the TEMP DATA of each stage): the chaining value the block started from
  // and whether the block is valid and the last one of its message.
  typedef struct packed {
    logic   valid;
    logic   last;
    state_t h;
  } tag_t;

  typedef word_t [NOPS-1:0] block_t;  // one 512-bit padded block, X[0] at index 0

  localparam state_t IV = '{a: 32'h67452301, b: 32'hEFCDAB89, c: 32'h98BADCFE,
                            d: 32'h10325476, e: 32'hC3D2E1F0};

  localparam word_t K_LEFT  [NROUNDS] = '{32'h00000000, 32'h5A827999, 32'h6ED9EBA1,
                                          32'h8F1BBCDC, 32'hA953FD4E};
  localparam word_t K_RIGHT [NROUNDS] = '{32'h50A28BE6, 32'h5C4DD124, 32'h6D703EF3,
                                          32'h7A6D76E9, 32'h00000000};

  // Message word selection, left line, operations 0..79.
  localparam logic [3:0] R_LEFT [80] = '{
     0,  1,  2,  3,  4,  5,  6,  7,  8,  9, 10, 11, 12, 13, 14, 15,
     7,  4, 13,  1, 10,  6, 15,  3, 12,  0,  9,  5,  2, 14, 11,  8,
     3, 10, 14,  4,  9, 15,  8,  1,  2,  7,  0,  6, 13, 11,  5, 12,
     1,  9, 11, 10,  0,  8, 12,  4, 13,  3,  7, 15, 14,  5,  6,  2,
     4,  0,  5,  9,  7, 12,  2, 10, 14,  1,  3,  8, 11,  6, 15, 13};

  // Message word selection, right line.
  localparam logic [3:0] R_RIGHT [80] = '{
     5, 14,  7,  0,  9,  2, 11,  4, 13,  6, 15,  8,  1, 10,  3, 12,
     6, 11,  3,  7,  0, 13,  5, 10, 14, 15,  8, 12,  4,  9,  1,  2,
    15,  5,  1,  3,  7, 14,  6,  9, 11,  8, 12,  2, 10,  0,  4, 13,
     8,  6,  4,  1,  3, 11, 15,  0,  5, 12,  2, 13,  9,  7, 10, 14,
    12, 15, 10,  4,  1,  5,  8,  7,  6,  2, 13, 14,  0,  3,  9, 11};

  // Rotation amounts, left line.
  localparam logic [3:0] S_LEFT [80] = '{
    11, 14, 15, 12,  5,  8,  7,  9, 11, 13, 14, 15,  6,  7,  9,  8,
     7,  6,  8, 13, 11,  9,  7, 15,  7, 12, 15,  9, 11,  7, 13, 12,
    11, 13,  6,  7, 14,  9, 13, 15, 14,  8, 13,  6,  5, 12,  7,  5,
    11, 12, 14, 15, 14, 15,  9,  8,  9, 14,  5,  6,  8,  6,  5, 12,
     9, 15,  5, 11,  6,  8, 13, 12,  5, 12, 13, 14, 11,  8,  5,  6};

  // Rotation amounts, right line.
  localparam logic [3:0] S_RIGHT [80] = '{
     8,  9,  9, 11, 13, 15, 15,  5,  7,  7,  8, 11, 14, 14, 12,  6,
     9, 13, 15,  7, 12,  8,  9, 11,  7,  7, 12,  7,  6, 15, 13, 11,
     9,  7, 15, 11,  8,  6,  6, 14, 12, 13,  5, 14, 13, 13,  7,  5,
    15,  5,  8, 11, 14, 14,  6, 14,  6,  9, 12,  9, 12,  5, 15,  8,
     8,  5, 12,  9, 12,  5, 14,  6,  8, 13,  6,  5, 15, 13, 11, 11};

  // Cyclic left rotation by 0..31 bits.
  function automatic word_t rol(input word_t x, input logic [4:0] s);
    return (s == 5'd0) ? x : ((x << s) | (x >> (6'd32 - {1'b0, s})));
  endfunction

  // Non-linear function number fsel (0..4 stands for f1..f5).
  function automatic word_t fnl(input int unsigned fsel, input word_t x, input word_t y,
                                input word_t z);
    case (fsel)
      0:       return x ^ y ^ z;
      1:       return (x & y) | (~x & z);
      2:       return (x | ~y) ^ z;
      3:       return (x & z) | (y & ~z);
      default: return x ^ (y | ~z);
    endcase
  endfunction

endpackage
