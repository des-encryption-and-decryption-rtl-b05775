// des_pkg: constants and bit-permutation helpers of the Data Encryption Standard.
//
// Holds the standard DES tables (initial and final permutation, expansion E, permutation P,
// permuted choices PC-1 and PC-2, the sixteen key-rotation counts and the eight S-boxes) and
// functions that apply them. Tables use the standard 1-based bit numbering in which bit 1 is
// the most significant bit of a vector, so for an N-bit vector x, bit n is x[N-n]. All
// functions are pure wiring or table lookups and synthesize to no registers. The tables are
// those of the published standard; the block structure that uses them follows the pipelined
// architecture described in the accompanying README.
package des_pkg;

  localparam int BLOCK_W  = 64;  // data block
  localparam int HALF_W   = 32;  // L or R half
  localparam int KEY_W    = 64;  // key as entered, with one parity bit per byte
  localparam int CD_W     = 56;  // key after PC-1 (C and D halves of 28 bits)
  localparam int SUBKEY_W = 48;  // round key
  localparam int ROUNDS   = 16;

  typedef logic [BLOCK_W-1:0]  block_t;
  typedef logic [HALF_W-1:0]   half_t;
  typedef logic [SUBKEY_W-1:0] subkey_t;
  typedef logic [27:0]         cd_half_t;

  // Initial permutation IP (output bit i takes input bit IP_TAB[i]).
  localparam byte unsigned IP_TAB [64] = '{
    58, 50, 42, 34, 26, 18, 10,  2, 60, 52, 44, 36, 28, 20, 12,  4,
    62, 54, 46, 38, 30, 22, 14,  6, 64, 56, 48, 40, 32, 24, 16,  8,
    57, 49, 41, 33, 25, 17,  9,  1, 59, 51, 43, 35, 27, 19, 11,  3,
    61, 53, 45, 37, 29, 21, 13,  5, 63, 55, 47, 39, 31, 23, 15,  7
  };
  // Final permutation, the inverse of IP.
  localparam byte unsigned FP_TAB [64] = '{
    40,  8, 48, 16, 56, 24, 64, 32, 39,  7, 47, 15, 55, 23, 63, 31,
    38,  6, 46, 14, 54, 22, 62, 30, 37,  5, 45, 13, 53, 21, 61, 29,
    36,  4, 44, 12, 52, 20, 60, 28, 35,  3, 43, 11, 51, 19, 59, 27,
    34,  2, 42, 10, 50, 18, 58, 26, 33,  1, 41,  9, 49, 17, 57, 25
  };
  // Expansion E, 32 -> 48 bits.
  localparam byte unsigned E_TAB [48] = '{
    32,  1,  2,  3,  4,  5,  4,  5,  6,  7,  8,  9,  8,  9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32,  1
  };
  // Permutation P after the S-boxes.
  localparam byte unsigned P_TAB [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,  1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9, 19, 13, 30,  6, 22, 11,  4, 25
  };
  // Permuted choice 1, 64-bit key -> C0 (first 28) and D0 (last 28).
  localparam byte unsigned PC1_TAB [56] = '{
    57, 49, 41, 33, 25, 17,  9,  1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27, 19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,  7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29, 21, 13,  5, 28, 20, 12,  4
  };
  // Permuted choice 2, C(i)D(i) -> 48-bit round key.
  localparam byte unsigned PC2_TAB [48] = '{
    14, 17, 11, 24,  1,  5,  3, 28, 15,  6, 21, 10, 23, 19, 12,  4,
    26,  8, 16,  7, 27, 20, 13,  2, 41, 52, 31, 37, 47, 55, 30, 40,
    51, 45, 33, 48, 44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32
  };
  // Left-rotation count of C and D before round 1..16.
  localparam byte unsigned SHIFT_TAB [16] = '{
     1,  1,  2,  2,  2,  2,  2,  2,  1,  2,  2,  2,  2,  2,  2,  1
  };
  // S-boxes S1..S8; entry index is row*16+column, row = bits 1 and 6, column = bits 2..5.
  localparam logic [3:0] SBOX [8][64] = '{
    '{ // S1
      14,  4, 13,  1,  2, 15, 11,  8,  3, 10,  6, 12,  5,  9,  0,  7,
       0, 15,  7,  4, 14,  2, 13,  1, 10,  6, 12, 11,  9,  5,  3,  8,
       4,  1, 14,  8, 13,  6,  2, 11, 15, 12,  9,  7,  3, 10,  5,  0,
      15, 12,  8,  2,  4,  9,  1,  7,  5, 11,  3, 14, 10,  0,  6, 13
    },
    '{ // S2
      15,  1,  8, 14,  6, 11,  3,  4,  9,  7,  2, 13, 12,  0,  5, 10,
       3, 13,  4,  7, 15,  2,  8, 14, 12,  0,  1, 10,  6,  9, 11,  5,
       0, 14,  7, 11, 10,  4, 13,  1,  5,  8, 12,  6,  9,  3,  2, 15,
      13,  8, 10,  1,  3, 15,  4,  2, 11,  6,  7, 12,  0,  5, 14,  9
    },
    '{ // S3
      10,  0,  9, 14,  6,  3, 15,  5,  1, 13, 12,  7, 11,  4,  2,  8,
      13,  7,  0,  9,  3,  4,  6, 10,  2,  8,  5, 14, 12, 11, 15,  1,
      13,  6,  4,  9,  8, 15,  3,  0, 11,  1,  2, 12,  5, 10, 14,  7,
       1, 10, 13,  0,  6,  9,  8,  7,  4, 15, 14,  3, 11,  5,  2, 12
    },
    '{ // S4
       7, 13, 14,  3,  0,  6,  9, 10,  1,  2,  8,  5, 11, 12,  4, 15,
      13,  8, 11,  5,  6, 15,  0,  3,  4,  7,  2, 12,  1, 10, 14,  9,
      10,  6,  9,  0, 12, 11,  7, 13, 15,  1,  3, 14,  5,  2,  8,  4,
       3, 15,  0,  6, 10,  1, 13,  8,  9,  4,  5, 11, 12,  7,  2, 14
    },
    '{ // S5
       2, 12,  4,  1,  7, 10, 11,  6,  8,  5,  3, 15, 13,  0, 14,  9,
      14, 11,  2, 12,  4,  7, 13,  1,  5,  0, 15, 10,  3,  9,  8,  6,
       4,  2,  1, 11, 10, 13,  7,  8, 15,  9, 12,  5,  6,  3,  0, 14,
      11,  8, 12,  7,  1, 14,  2, 13,  6, 15,  0,  9, 10,  4,  5,  3
    },
    '{ // S6
      12,  1, 10, 15,  9,  2,  6,  8,  0, 13,  3,  4, 14,  7,  5, 11,
      10, 15,  4,  2,  7, 12,  9,  5,  6,  1, 13, 14,  0, 11,  3,  8,
       9, 14, 15,  5,  2,  8, 12,  3,  7,  0,  4, 10,  1, 13, 11,  6,
       4,  3,  2, 12,  9,  5, 15, 10, 11, 14,  1,  7,  6,  0,  8, 13
    },
    '{ // S7
       4, 11,  2, 14, 15,  0,  8, 13,  3, 12,  9,  7,  5, 10,  6,  1,
      13,  0, 11,  7,  4,  9,  1, 10, 14,  3,  5, 12,  2, 15,  8,  6,
       1,  4, 11, 13, 12,  3,  7, 14, 10, 15,  6,  8,  0,  5,  9,  2,
       6, 11, 13,  8,  1,  4, 10,  7,  9,  5,  0, 15, 14,  2,  3, 12
    },
    '{ // S8
      13,  2,  8,  4,  6, 15, 11,  1, 10,  9,  3, 14,  5,  0, 12,  7,
       1, 15, 13,  8, 10,  3,  7,  4, 12,  5,  6, 11,  0, 14,  9,  2,
       7, 11,  4,  1,  9, 12, 14,  2,  0,  6, 10, 13, 15,  3,  5,  8,
       2,  1, 14,  7,  4, 10,  8, 13, 15, 12,  9,  0,  3,  5,  6, 11
    }
  };

  function automatic block_t initial_perm(block_t x);
    block_t y;
    for (int i = 0; i < 64; i++) y[63-i] = x[64-int'(IP_TAB[i])];
    return y;
  endfunction

  function automatic block_t final_perm(block_t x);
    block_t y;
    for (int i = 0; i < 64; i++) y[63-i] = x[64-int'(FP_TAB[i])];
    return y;
  endfunction

  function automatic subkey_t expand(half_t r);
    subkey_t y;
    for (int i = 0; i < 48; i++) y[47-i] = r[32-int'(E_TAB[i])];
    return y;
  endfunction

  function automatic half_t pbox(half_t x);
    half_t y;
    for (int i = 0; i < 32; i++) y[31-i] = x[32-int'(P_TAB[i])];
    return y;
  endfunction

  function automatic logic [CD_W-1:0] pc1(logic [KEY_W-1:0] k);
    logic [CD_W-1:0] y;
    for (int i = 0; i < 56; i++) y[55-i] = k[64-int'(PC1_TAB[i])];
    return y;
  endfunction

  function automatic subkey_t pc2(logic [CD_W-1:0] cd);
    subkey_t y;
    for (int i = 0; i < 48; i++) y[47-i] = cd[56-int'(PC2_TAB[i])];
    return y;
  endfunction

  // S-box n (0..7) applied to a 6-bit group b1..b6 (b1 = MSB).
  function automatic logic [3:0] sbox(logic [2:0] n, logic [5:0] b);
    return SBOX[n][{b[5], b[0], b[4:1]}];
  endfunction

  function automatic cd_half_t rotl28(cd_half_t x, int s);
    return (s == 1) ? {x[26:0], x[27]} : {x[25:0], x[27:26]};
  endfunction

  function automatic cd_half_t rotr28(cd_half_t x, int s);
    return (s == 1) ? {x[0], x[27:1]} : {x[1:0], x[27:2]};
  endfunction

endpackage
