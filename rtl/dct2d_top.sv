// dct2d_top -- low-power 8x8 2-D DCT processor (direct 2-D method, parallel
// distributed arithmetic).
//
// Samples enter word-serially, one 9-bit two's-complement value per cycle
// while in_valid is high, 64 per block in raster order (x[n1][n2] at index
// 8*n1+n2). They are written alternately into two 64x9 input transpose SRAMs
// (ping-pong). A full bank is read back as 9 bit planes, each plane giving
// one bit of all 64 samples, and fed bit-serially to the core (dct_core),
// which computes the 64 unnormalised DCT coefficients
//   Y[k1][k2] = sum x[n1][n2] cos(pi(2n1+1)k1/16) cos(pi(2n2+1)k2/16)
// in parallel. The core's 64 results are stored bit plane by bit plane into
// one of two 64x16 output transpose SRAMs (ping-pong) and read out as 16-bit
// words, one per cycle, in raster order of (k1, k2), with out_valid.
//
// Throughput is one sample per clock (a block every 64 cycles) with no
// backpressure. Latency, from the cycle the last sample of a block is
// accepted to the first out_valid of that block, is 32 cycles; the last
// coefficient follows 63 cycles later. Gaps in in_valid are allowed; a block
// is processed as soon as its 64th sample is in. 'overrun' flags a schedule
// violation (see dct_ctrl), which cannot occur at one sample per cycle or
// less.
//
// The buffer organisation, word lengths (9-bit in, 16-bit out) and the
// direct-method datapath follow the source design; the controller schedule,
// the DA fixed-point format and the output order are this design's own.
module dct2d_top
  import dct_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  in_word_t  in_data,
  output logic      out_valid,
  output out_word_t out_data,
  output logic      overrun
);
  logic       in_we, in_wbank, in_re, in_rbank;
  logic [5:0] in_waddr;
  logic [3:0] in_rcol;
  logic       core_valid, core_first, core_last, core_y_valid;
  logic [3:0] plane_sel;
  logic       out_we, out_wbank, out_re, out_rbank;
  logic [3:0] out_wrow;
  logic [5:0] out_raddr;
  logic       blk_start;

  dct_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_we(in_we), .in_wbank(in_wbank), .in_waddr(in_waddr),
    .in_re(in_re), .in_rbank(in_rbank), .in_rcol(in_rcol),
    .core_valid(core_valid), .core_first(core_first), .core_last(core_last),
    .core_y_valid(core_y_valid), .plane_sel(plane_sel),
    .out_we(out_we), .out_wbank(out_wbank), .out_wrow(out_wrow),
    .out_re(out_re), .out_rbank(out_rbank), .out_raddr(out_raddr),
    .out_valid(out_valid), .blk_start(blk_start), .overrun(overrun));

  // ---------------- input ping-pong buffers ----------------
  logic [NN-1:0] in_plane [2];
  logic [NN-1:0] plane;

  for (genvar k = 0; k < 2; k++) begin : g_in_bank
    dct_tp_sram #(.ROWS(NN), .COLS(IN_W)) u_sram (
      .clk(clk), .rst_n(rst_n),
      .wr_en(in_we && in_wbank == 1'(k)), .wr_row(in_waddr), .wr_data(in_data),
      .rd_en(in_re && in_rbank == 1'(k)), .rd_col(in_rcol), .rd_data(in_plane[k]));
  end

  logic in_msel;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) in_msel <= 1'b0;
    else if (in_re) in_msel <= in_rbank;

  dct_bank_mux #(.W(NN)) u_in_mux (
    .sel(in_msel), .d0(in_plane[0]), .d1(in_plane[1]), .q(plane));

  // ---------------- 2-D DCT core ----------------
  logic [NN-1:0] y_plane;
  out_word_t     coef [N][N];
  logic [NN-1:0] rom_eval;

  dct_core u_core (
    .clk(clk), .rst_n(rst_n), .plane(plane),
    .valid(core_valid), .first(core_first), .last(core_last),
    .plane_sel(plane_sel), .y_plane(y_plane), .coef(coef),
    .y_valid(core_y_valid), .rom_eval(rom_eval));

  // ---------------- output ping-pong buffers ----------------
  logic [OUT_W-1:0] out_word [2];
  logic [OUT_W-1:0] out_q;

  for (genvar k = 0; k < 2; k++) begin : g_out_bank
    dct_tp_sram #(.ROWS(OUT_W), .COLS(NN)) u_sram (
      .clk(clk), .rst_n(rst_n),
      .wr_en(out_we && out_wbank == 1'(k)), .wr_row(out_wrow), .wr_data(y_plane),
      .rd_en(out_re && out_rbank == 1'(k)), .rd_col(out_raddr), .rd_data(out_word[k]));
  end

  logic out_msel;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_msel <= 1'b0;
    else if (out_re) out_msel <= out_rbank;

  dct_bank_mux #(.W(OUT_W)) u_out_mux (
    .sel(out_msel), .d0(out_word[0]), .d1(out_word[1]), .q(out_q));

  assign out_data = out_word_t'(out_q);
endmodule
