// dct_pkg -- constants, word types and index functions shared by the 8x8
// direct 2-D DCT.
//
// The transform computed is the unnormalised 2-D DCT-II
//   Y[k1][k2] = sum_{n1,n2} x[n1][n2] cos(pi(2n1+1)k1/16) cos(pi(2n2+1)k2/16)
// (the 2c(k1)c(k2)/N kernel factor is left out, as in the source design).
// Input samples are 9-bit two's complement (-255..255), outputs 16-bit.
//
// The direct method first permutes the block (x -> y, rows and columns
// reordered even-ascending / odd-descending), then maps each row index n2 to
// a "twiddle" index t through 4*n2+1 = (4t+1)(4n1+1) mod 4N. Each of the N
// resulting sequences y[n1][t] (n1 = 0..N-1) feeds one 1-D transform. The
// functions below give those index maps; the hardware uses them only at
// elaboration time, as fixed wiring.
//
// Fixed-point choices of this implementation (the source gives only the
// 9-bit input, 16-bit output and the 13-bit accumulator adder):
//   ROM words       12 bits signed, 8 fractional bits
//   accumulator     13 bits (the 13-bit carry-select adder)
//   1-D results     16 bits signed, 4 fractional bits
//   cosine table    16 fractional bits, used only to fill the ROMs; each ROM
//                   word is rounded once from the exact sum of its terms.
package dct_pkg;

  localparam int N        = 8;           // block size N x N
  localparam int NN       = N * N;       // samples per block
  localparam int IN_W     = 9;           // input word length
  localparam int OUT_W    = 16;          // output word length
  localparam int SER_W    = IN_W + 1;    // bit-serial cycles (one sign-extension bit for the butterfly)
  localparam int ROM_W    = 12;          // DA ROM word length
  localparam int ROM_FRAC = 8;           // fractional bits of a ROM word
  localparam int ACC_W    = 13;          // DA accumulator adder width
  localparam int R_W      = 16;          // 1-D result word length
  localparam int R_FRAC   = 4;           // fractional bits of a 1-D result
  localparam int U_W      = 24;          // width of the combination network sums

  typedef logic signed [IN_W-1:0]  in_word_t;
  typedef logic signed [OUT_W-1:0] out_word_t;
  typedef logic signed [ROM_W-1:0] rom_word_t;
  typedef logic signed [R_W-1:0]   r_word_t;

  // cos(k*pi/16) * 2^16 for k = 0..8
  localparam int COS16 [9] = '{65536, 64277, 60547, 54491, 46341, 36410, 25080, 12785, 0};

  // cos(k*pi/16) * 2^16 for any integer k >= 0
  function automatic int cos_q16(input int k);
    int m;
    m = k % 32;
    if (m <= 8)       return  COS16[m];
    else if (m <= 16) return -COS16[16 - m];
    else if (m <= 24) return -COS16[m - 16];
    else              return  COS16[32 - m];
  endfunction

  // Row/column permutation of the direct method: y index n -> x index.
  function automatic int perm(input int n);
    return (n < N/2) ? 2 * n : 2 * N - 2 * n - 1;
  endfunction

  // Column index n2 of y that feeds 1-D transform t at position n1,
  // from 4*n2+1 = (4t+1)(4n1+1) mod 4N.
  function automatic int tw_col(input int t, input int n1);
    return ((((4 * t + 1) * (4 * n1 + 1)) % (4 * N)) - 1) / 4;
  endfunction

  // Raster address (8*row + col) of the x sample that is input n1 of 1-D
  // transform t.
  function automatic int x_addr(input int t, input int n1);
    return N * perm(n1) + perm(tw_col(t, n1));
  endfunction

  // DA ROM word for output b of a 1-D transform: after the butterfly
  // (s_n = y_n + y_{n+4}, d_n = y_n - y_{n+4}), output b is
  //   R(b) = sum_{n=0}^{3} u_n cos(pi (4n+1) b / 16),  u = s (b even) or d (b odd).
  // Word[addr] = sum of the coefficients whose address bit is set, rounded
  // to ROM_FRAC fractional bits.
  function automatic int rom_word(input int b, input int addr);
    int s;
    s = 0;
    for (int n = 0; n < N/2; n++)
      if (((addr >> n) & 1) != 0) s += cos_q16((4 * n + 1) * b);
    return (s + (1 << (15 - ROM_FRAC))) >>> (16 - ROM_FRAC);
  endfunction

endpackage
