// tb_dct2d_top -- end-to-end test of the 2-D DCT processor at its default
// (and only) configuration.
//
// Streams NBLK 8x8 blocks through the chip: extreme blocks (all +255, all
// -255, +-255 checkerboards that drive the highest AC coefficients, an
// all-zero block) followed by random blocks. Most blocks are sent back to
// back at one sample per cycle; some have random idle cycles inside.
// Every output coefficient is compared with a floating-point evaluation of
// the 2-D DCT-II definition; an error above TOL fails. It also checks:
//   - the latency from the last sample of a block to its first output;
//   - that a continuously fed stream comes out continuously (64 words every
//     64 cycles, no gaps between consecutive blocks);
//   - that the overrun flag stays low.
// Mechanism counters (each must be seen at least once): input bank swaps to
// each bank, output bank swaps to each bank, idle input cycles inside a
// block, a block completing while the previous block is still being output,
// and ROM evaluations skipped by address-transition detection.
module tb_dct2d_top;
  import dct_pkg::*;

  localparam int NBLK    = 16;
  localparam int TOL     = 12;   // max |error| in output LSBs
  localparam int LATENCY = 32;   // last sample accepted -> first out_valid

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  in_word_t in_data;
  logic out_valid;
  out_word_t out_data;
  logic overrun;

  always #5 clk = ~clk;

  dct2d_top dut (.*);

  int checks = 0, failures = 0;
  int blk [NBLK][N][N];
  real yref [NBLK][N][N];
  real max_err = 0.0;
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real cosr(int n, int k);
    return $cos(3.14159265358979323846 * (2 * n + 1) * k / 16.0);
  endfunction

  task automatic make_blocks();
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          case (b)
            0: blk[b][i][j] = 255;
            1: blk[b][i][j] = -255;
            2: blk[b][i][j] = ((i + j) % 2 == 0) ? 255 : -255;
            3: blk[b][i][j] = ((i + j) % 2 == 0) ? -255 : 255;
            4: blk[b][i][j] = 0;
            5: blk[b][i][j] = (i < 4) ? 255 : -255;
            default: blk[b][i][j] = int'($urandom_range(510)) - 255;
          endcase
    for (int b = 0; b < NBLK; b++)
      for (int k1 = 0; k1 < N; k1++)
        for (int k2 = 0; k2 < N; k2++) begin
          real s;
          s = 0.0;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++)
              s += blk[b][i][j] * cosr(i, k1) * cosr(j, k2);
          yref[b][k1][k2] = s;
        end
  endtask

  // ---------------- stimulus ----------------
  longint last_in_cyc [NBLK];
  int gaps = 0;

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    make_blocks();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < NN; i++) begin
        if ((b == 7 || b == 8) && i > 0 && $urandom_range(3) == 0) begin
          int g;
          g = int'($urandom_range(3)) + 1;
          in_valid <= 1'b0;
          repeat (g) @(posedge clk);
          gaps += g;
        end
        in_valid <= 1'b1;
        in_data  <= in_word_t'(blk[b][i / N][i % N]);
        @(posedge clk);
        if (i == NN - 1) last_in_cyc[b] = cyc;
      end
    end
    in_valid <= 1'b0;
  end

  // ---------------- checking ----------------
  int ob = 0, oi = 0;
  longint first_out_cyc [NBLK];
  longint prev_out_cyc = -1;
  int bursts_ok = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e;
      if (oi == 0) first_out_cyc[ob] = cyc;
      if (ob < NBLK) begin
        e = $itor(out_data) - yref[ob][oi / N][oi % N];
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > TOL) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH block %0d Y[%0d][%0d] = %0d, expected %f",
                     ob, oi / N, oi % N, out_data, yref[ob][oi / N][oi % N]);
        end
      end
      // words of one block, and of back-to-back blocks, must be contiguous
      if (prev_out_cyc >= 0 && oi != 0 && cyc != prev_out_cyc + 1) begin
        failures++;
        $display("GAP inside output block %0d at word %0d", ob, oi);
      end
      prev_out_cyc = cyc;
      oi++;
      if (oi == NN) begin oi = 0; ob++; end
    end
  end

  // ---------------- mechanism counters ----------------
  int in_swap [2], out_swap [2], overlap = 0, atd_skip = 0, atd_eval = 0;
  logic prev_in_wbank = 1'b0, prev_out_wbank = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.in_wbank != prev_in_wbank) in_swap[dut.u_ctrl.in_wbank]++;
    if (dut.u_ctrl.out_wbank != prev_out_wbank) out_swap[dut.u_ctrl.out_wbank]++;
    prev_in_wbank  <= dut.u_ctrl.in_wbank;
    prev_out_wbank <= dut.u_ctrl.out_wbank;
    if (dut.u_ctrl.blk_start && dut.u_ctrl.out_re) overlap++;
    if (dut.u_core.valid) begin
      atd_skip += NN - $countones(dut.u_core.rom_eval);
      atd_eval += $countones(dut.u_core.rom_eval);
    end
  end

  initial begin
    in_swap = '{0, 0};
    out_swap = '{0, 0};
  end

  // ---------------- end and watchdog ----------------
  initial begin
    wait (ob == NBLK);
    repeat (5) @(posedge clk);
    // latency and continuity
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (first_out_cyc[b] - last_in_cyc[b] != LATENCY) begin
        failures++;
        $display("LATENCY block %0d: %0d cycles, expected %0d", b,
                 first_out_cyc[b] - last_in_cyc[b], LATENCY);
      end
    end
    checks++;
    if (overrun) begin failures++; $display("OVERRUN flagged"); end
    checks++;
    if (first_out_cyc[1] - first_out_cyc[0] != NN) begin
      failures++; $display("THROUGHPUT: blocks 0 and 1 not %0d cycles apart", NN);
    end
    $display("mechanisms: in_swap=%0d/%0d out_swap=%0d/%0d input_gap_cycles=%0d overlap=%0d atd_skip=%0d atd_eval=%0d",
             in_swap[0], in_swap[1], out_swap[0], out_swap[1], gaps, overlap, atd_skip, atd_eval);
    $display("max |error| = %f LSB", max_err);
    checks++; if (in_swap[0] == 0 || in_swap[1] == 0) begin failures++; $display("input ping-pong not exercised"); end
    checks++; if (out_swap[0] == 0 || out_swap[1] == 0) begin failures++; $display("output ping-pong not exercised"); end
    checks++; if (gaps == 0) begin failures++; $display("no input gaps"); end
    checks++; if (overlap == 0) begin failures++; $display("no block overlapped the previous output"); end
    checks++; if (atd_skip == 0) begin failures++; $display("no ROM evaluation skipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 200 + 1000) @(posedge clk);
    failures++;
    $display("WATCHDOG: only %0d of %0d blocks came out", ob, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
