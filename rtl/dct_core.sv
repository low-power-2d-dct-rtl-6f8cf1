// dct_core -- the direct 2-D DCT datapath ("2D DCT" block): 64 bit-serial
// inputs in, 64 coefficients out.
//
// Each cycle it receives one bit plane of the 8x8 input block (bit i of all
// 64 samples, raster order, LSB first, SER_W planes with the sign plane
// repeated last). Fixed wiring applies the permutation of the direct method:
// 1-D transform t gets, as its input n1, the sample at raster address
// x_addr(t, n1) (dct_pkg). The eight transforms (dct_cplx_1d) run in
// parallel; when their results are ready the combination network (dct_post)
// forms all 64 coefficients, which are registered here.
//
// The registered coefficients are then read out one bit plane at a time for
// the output transpose buffer: y_plane[i] is bit 'plane_sel' of coefficient
// i = 8*k1 + k2. The full words are also available on 'coef'.
//
// Timing: 'y_valid' pulses three cycles after the cycle carrying 'last';
// 'coef' and 'y_plane' are valid from that cycle until the next block is
// captured. A new block may start right after 'last' of the previous one.
module dct_core
  import dct_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NN-1:0] plane,
  input  logic          valid,
  input  logic          first,
  input  logic          last,
  input  logic [3:0]    plane_sel,
  output logic [NN-1:0] y_plane,
  output out_word_t     coef [N][N],
  output logic          y_valid,
  output logic [NN-1:0] rom_eval
);
  r_word_t      r [N][N];
  logic [N-1:0] rv;

  for (genvar t = 0; t < N; t++) begin : g_t
    logic [N-1:0] yb;
    for (genvar n1 = 0; n1 < N; n1++) begin : g_in
      assign yb[n1] = plane[x_addr(t, n1)];
    end
    dct_cplx_1d u_1d (
      .clk(clk), .rst_n(rst_n), .y_bit(yb),
      .valid(valid), .first(first), .last(last),
      .r(r[t]), .res_valid(rv[t]), .rom_eval(rom_eval[N*t +: N]));
  end

  out_word_t y_comb [N][N];

  dct_post u_post (.r(r), .y(y_comb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      for (int k1 = 0; k1 < N; k1++)
        for (int k2 = 0; k2 < N; k2++) coef[k1][k2] <= '0;
    end else begin
      y_valid <= rv[0];
      if (rv[0]) coef <= y_comb;
    end
  end

  always_comb
    for (int i = 0; i < NN; i++) y_plane[i] = coef[i / N][i % N][plane_sel];
endmodule
