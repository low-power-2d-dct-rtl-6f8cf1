// dct_post -- routing module and combination network of the direct 2-D DCT.
//
// Input: r[t][b], the real outputs Re V_t(b) of the N 1-D transforms
// (R_W bits, R_FRAC fractional bits). Output: the 2-D coefficients y[k1][k2].
//
// Every sequence used below, V_t and all its combinations, extends past
// b = N-1 by X(b + N) = -j X(b), so "X at index m" is X(m mod N) rotated by
// (-j)^(m div N): a swap/negate of real and imaginary parts, i.e. routing.
// With t = t0 + 2 t1 + 4 t2 and c = k1 + k2,
//   U[k1][k2] = sum_t V_t(c + 4 t k2),
// which is split radix-2 over t in three butterfly layers:
//
// Layer 1 (pairs t, t+4, factor (-j)^(2 k2) = (-1)^k2):
//   a[p][t0][t1][b] = r[t][b] + (-1)^p r[t+4][b],  p = k2 mod 2.
//   Real-valued: its imaginary part at b is minus its real part at N-b.
// Layer 2 (pairs t1 = 0, 1, factor (-j)^k2), for each q = k2 mod 4:
//   B[t0][q](b) = A[t0][0](b) + (-j)^q A[t0][1](b), complex, b = 0..N-1.
// Layer 3 (t0 = 0, 1), for each needed column k2 and each k1:
//   U[k1][k2] = B[0][q](c) + B[1][q](c + 4 k2),
//   the second index evaluated through the routing rule above.
// Only the columns k2 in {0,1,2,4,5} are formed; their pairs {k2, N-k2}
// cover every column.
//
// Output stage (eq. 4):
//   Y[k1][k2]   = 1/2 (Re U[k1][k2] - Im U[N-k1][k2])
//   Y[k1][N-k2] = 1/2 (-Im U[k1][k2] - Re U[N-k1][k2])
// For k1 = 0 the partner U[N][k2] equals -j U[0][k2], which turns these into
// Y[0][k2] = Re U[0][k2] and Y[0][N-k2] = -Im U[0][k2] (the x1 and x(-1)
// outputs of the network; all others are x1/2). Results are rounded to
// integers (round half up).
//
// The first layer pairs the transforms as the source design draws it (0 with
// 4, 2 with 6, 1 with 5, 3 with 7), followed by routing and two further adder
// layers; the exact wiring of those later layers is this design's own
// derivation of the same algorithm.
// Purely combinational; the core registers the result.
module dct_post
  import dct_pkg::*;
(
  input  r_word_t   r [N][N],   // [t][b]
  output out_word_t y [N][N]    // [k1][k2]
);
  localparam int NK = 5;
  localparam int K2SET [NK] = '{0, 1, 2, 4, 5};

  typedef logic signed [U_W-1:0] u_t;

  // rotate (x, y) by (-j)^q
  function automatic void rot(input u_t xi, input u_t yi, input int q,
                              output u_t xo, output u_t yo);
    case (q % 4)
      0: begin xo =  xi; yo =  yi; end
      1: begin xo =  yi; yo = -xi; end
      2: begin xo = -xi; yo = -yi; end
      default: begin xo = -yi; yo =  xi; end
    endcase
  endfunction

  u_t a   [2][2][2][N];   // layer 1: [k2 parity][t0][t1][b]
  u_t bre [2][4][N];      // layer 2: [t0][k2 mod 4][b]
  u_t bim [2][4][N];
  u_t re_u [N][NK];
  u_t im_u [N][NK];

  always_comb begin
    for (int t0 = 0; t0 < 2; t0++)
      for (int t1 = 0; t1 < 2; t1++)
        for (int b = 0; b < N; b++) begin
          a[0][t0][t1][b] = U_W'(r[t0 + 2*t1][b]) + U_W'(r[t0 + 2*t1 + N/2][b]);
          a[1][t0][t1][b] = U_W'(r[t0 + 2*t1][b]) - U_W'(r[t0 + 2*t1 + N/2][b]);
        end
  end

  always_comb begin
    for (int t0 = 0; t0 < 2; t0++)
      for (int q = 0; q < 4; q++)
        for (int b = 0; b < N; b++) begin
          u_t x0, y0, x1, y1, xr, yr;
          x0 = a[q % 2][t0][0][b];
          y0 = (b == 0) ? '0 : -a[q % 2][t0][0][(N - b) % N];
          x1 = a[q % 2][t0][1][b];
          y1 = (b == 0) ? '0 : -a[q % 2][t0][1][(N - b) % N];
          rot(x1, y1, q, xr, yr);
          bre[t0][q][b] = x0 + xr;
          bim[t0][q][b] = y0 + yr;
        end
  end

  always_comb begin
    for (int k1 = 0; k1 < N; k1++)
      for (int j = 0; j < NK; j++) begin
        int k2, c, m1;
        logic [1:0] q;
        u_t x0, y0, x1, y1;
        k2 = K2SET[j];
        q  = 2'(k2 % 4);
        c  = k1 + k2;
        m1 = c + 4 * (k2 % 2);
        rot(bre[0][q][c % N], bim[0][q][c % N], c / N, x0, y0);
        rot(bre[1][q][m1 % N], bim[1][q][m1 % N], m1 / N + k2 / 2, x1, y1);
        re_u[k1][j] = x0 + x1;
        im_u[k1][j] = y0 + y1;
      end
  end

  localparam int SH1 = R_FRAC;       // x1 outputs
  localparam int SH2 = R_FRAC + 1;   // x1/2 outputs

  always_comb begin
    for (int k1 = 0; k1 < N; k1++)
      for (int k2 = 0; k2 < N; k2++)
        y[k1][k2] = '0;
    for (int j = 0; j < NK; j++) begin
      int k2;
      k2 = K2SET[j];
      for (int k1 = 0; k1 < N; k1++) begin
        u_t v;
        if (k1 == 0) begin
          v = re_u[0][j] + u_t'(1 << (SH1 - 1));
          y[0][k2] = out_word_t'(v >>> SH1);
        end else begin
          v = re_u[k1][j] - im_u[N-k1][j] + u_t'(1 << (SH2 - 1));
          y[k1][k2] = out_word_t'(v >>> SH2);
        end
        if (k2 != 0 && k2 != N/2) begin
          if (k1 == 0) begin
            v = -im_u[0][j] + u_t'(1 << (SH1 - 1));
            y[0][N-k2] = out_word_t'(v >>> SH1);
          end else begin
            v = -im_u[k1][j] - re_u[N-k1][j] + u_t'(1 << (SH2 - 1));
            y[k1][N-k2] = out_word_t'(v >>> SH2);
          end
        end
      end
    end
  end
endmodule
