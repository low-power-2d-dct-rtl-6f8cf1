// dct_cplx_1d -- the "complex 1-D DCT" of the direct 2-D method, built in
// parallel distributed arithmetic.
//
// For one twiddle index t the direct method needs the N-point complex sums
//   V(b) = sum_{n=0}^{N-1} y_n W_{4N}^{(4n+1)b},   W_{4N} = exp(-j 2pi/4N).
// Their imaginary parts follow from the real parts, Im V(b) = -Re V(N-b) and
// Im V(0) = 0, so the block computes only the N real values
//   R(b) = Re V(b) = sum_n y_n cos(pi(4n+1)b/16),   b = 0..7,
// which is an 8-point DCT-II of the un-permuted row. A fast first step halves
// the DA tables: bit-serial butterflies (dct_bs_alu) form s_n = y_n + y_{n+4}
// and d_n = y_n - y_{n+4}; even outputs use s, odd outputs use d, so each
// output is a 4-input DA unit with a 16-word ROM.
//
// Interface: y_bit[n] is bit i of input y_n in cycle i, LSB first, for SER_W
// cycles (the sign bit repeated in the last cycle, so the butterfly result
// keeps all its bits); valid/first/last frame the word. r[b] and res_valid
// appear two cycles after 'last' (see dct_da_unit).
module dct_cplx_1d
  import dct_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] y_bit,
  input  logic         valid,
  input  logic         first,
  input  logic         last,
  output r_word_t      r [N],
  output logic         res_valid,
  output logic [N-1:0] rom_eval
);
  logic [N/2-1:0] s_bit, d_bit;

  for (genvar n = 0; n < N/2; n++) begin : g_bfly
    dct_bs_alu u_add (
      .clk(clk), .rst_n(rst_n), .en(valid), .first(first), .sub(1'b0),
      .a(y_bit[n]), .b(y_bit[n + N/2]), .s(s_bit[n]));
    dct_bs_alu u_sub (
      .clk(clk), .rst_n(rst_n), .en(valid), .first(first), .sub(1'b1),
      .a(y_bit[n]), .b(y_bit[n + N/2]), .s(d_bit[n]));
  end

  logic [N-1:0] rv;

  for (genvar b = 0; b < N; b++) begin : g_da
    dct_da_unit #(.B(b)) u_da (
      .clk(clk), .rst_n(rst_n),
      .addr((b % 2 == 0) ? s_bit : d_bit),
      .valid(valid), .first(first), .last(last),
      .result(r[b]), .res_valid(rv[b]), .rom_eval(rom_eval[b]));
  end

  assign res_valid = &rv;   // the eight units run in lock step
endmodule
