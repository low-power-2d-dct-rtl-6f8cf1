// tb_dct_hdtv_frame -- workload test: one full HDTV frame in 4:2:2 chroma
// format pushed through the processor at one sample per clock.
//
// A 1920x1080 frame with 4:2:2 sampling carries 1920x1080 luma and two
// 960x1080 chroma samples, i.e. 240x135 + 2 x 120x135 = 64,800 blocks of 8x8
// (a 4:2:0 frame is the first 48,600 of those blocks' worth of samples, so
// this test covers it as well). The content is synthetic: smooth gradients
// and a moving diagonal pattern plus noise, level-shifted into -255..255.
// Blocks are sent back to back without a single idle cycle; every
// coefficient is compared with a separable floating-point 2-D DCT
// (tolerance 12 LSB). The testbench checks that the output stream stays
// contiguous, that overrun never rises, and that the last coefficient
// appears exactly 64 * 64800 + 95 cycles after the first sample -- the
// sustained rate of one sample per clock that real-time 4:2:2 HDTV at
// 30 frames/s needs at 124.4 MHz.
module tb_dct_hdtv_frame;
  import dct_pkg::*;

  localparam int LUMA_BX   = 240;
  localparam int CHROMA_BX = 120;
  localparam int BY        = 135;
  localparam int NBLK      = LUMA_BX * BY + 2 * CHROMA_BX * BY;   // 64800
  localparam int TOL       = 12;
  localparam real PI       = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  in_word_t in_data;
  logic out_valid;
  out_word_t out_data;
  logic overrun;

  always #5 clk = ~clk;

  dct2d_top dut (.*);

  int checks = 0, failures = 0;
  real max_err = 0.0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real cosm [N][N];
  initial
    for (int n = 0; n < N; n++)
      for (int k = 0; k < N; k++) cosm[n][k] = $cos(PI * (2 * n + 1) * k / 16.0);

  // synthetic picture sample of block b, position (i, j)
  function automatic int pix(int b, int i, int j);
    int plane, bx, by, px, py, v;
    if (b < LUMA_BX * BY) begin plane = 0; bx = b % LUMA_BX; by = b / LUMA_BX; end
    else begin plane = 1 + (b - LUMA_BX * BY) / (CHROMA_BX * BY);
               bx = (b - LUMA_BX * BY) % CHROMA_BX; by = ((b - LUMA_BX * BY) / CHROMA_BX) % BY; end
    px = 8 * bx + j;
    py = 8 * by + i;
    v = (px * (3 + plane)) % 256 + (py % 97) - 128 + ((px + py) % 40 < 4 ? 120 : 0)
        + int'($urandom_range(30)) - 15;
    if (v > 255) v = 255;
    if (v < -255) v = -255;
    return v;
  endfunction

  // expected coefficients, kept for the blocks in flight
  localparam int QD = 4;
  real yq [QD][N][N];
  int  xb [N][N];

  task automatic ref_block(int slot);
    real tmp [N][N];
    for (int i = 0; i < N; i++)
      for (int k2 = 0; k2 < N; k2++) begin
        real s; s = 0.0;
        for (int j = 0; j < N; j++) s += xb[i][j] * cosm[j][k2];
        tmp[i][k2] = s;
      end
    for (int k1 = 0; k1 < N; k1++)
      for (int k2 = 0; k2 < N; k2++) begin
        real s; s = 0.0;
        for (int i = 0; i < N; i++) s += tmp[i][k2] * cosm[i][k1];
        yq[slot][k1][k2] = s;
      end
  endtask

  longint first_in_cyc = -1;

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) xb[i][j] = pix(b, i, j);
      ref_block(b % QD);
      for (int i = 0; i < NN; i++) begin
        in_valid <= 1'b1;
        in_data  <= in_word_t'(xb[i / N][i % N]);
        @(posedge clk);
        if (first_in_cyc < 0) first_in_cyc = cyc;
      end
    end
    in_valid <= 1'b0;
  end

  int ob = 0, oi = 0;
  longint prev_out_cyc = -1, last_out_cyc = -1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e;
      e = $itor(out_data) - yq[ob % QD][oi / N][oi % N];
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("MISMATCH block %0d word %0d: %0d expected %f",
                                    ob, oi, out_data, yq[ob % QD][oi / N][oi % N]);
      end
      if (prev_out_cyc >= 0 && cyc != prev_out_cyc + 1) begin
        failures++;
        if (failures < 10) $display("GAP before block %0d word %0d", ob, oi);
      end
      prev_out_cyc = cyc;
      oi++;
      if (oi == NN) begin oi = 0; ob++; end
      if (ob == NBLK) last_out_cyc = cyc;
    end
  end

  initial begin
    wait (ob == NBLK);
    repeat (3) @(posedge clk);
    checks++;
    if (overrun) begin failures++; $display("OVERRUN"); end
    checks++;
    if (last_out_cyc - first_in_cyc != longint'(NN) * NBLK + 95 - 1) begin
      failures++;
      $display("FRAME TIME %0d cycles, expected %0d", last_out_cyc - first_in_cyc,
               longint'(NN) * NBLK + 95 - 1);
    end
    $display("frame: %0d blocks, %0d cycles, max |error| %f", NBLK, last_out_cyc - first_in_cyc, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NN * NBLK + 2000) @(posedge clk);
    failures++;
    $display("WATCHDOG: %0d of %0d blocks out", ob, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
