// tb_dct_core -- drives the 2-D DCT core directly with the bit planes of
// 8x8 blocks (full-scale and random), back to back, and compares all 64
// coefficients with the 2-D DCT-II definition evaluated in floating point
// (tolerance 12 LSB, the accumulated ROM quantisation of eight DA results).
// It also checks that y_valid comes three cycles after 'last' and that the
// bit-plane output y_plane carries bit plane_sel of every coefficient.
module tb_dct_core;
  import dct_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NN-1:0] plane, y_plane, rom_eval;
  logic valid, first, last, y_valid;
  logic [3:0] plane_sel;
  out_word_t coef [N][N];
  int checks = 0, failures = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;

  dct_core dut (.*);

  localparam int NB = 12;
  localparam real PI = 3.14159265358979323846;
  int x [NB][NN];
  int got = 0;
  longint cyc = 0, last_cyc [NB];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    valid = 0; first = 0; last = 0; plane = 0; plane_sel = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < NN; i++)
        case (b)
          0: x[b][i] = 255;
          1: x[b][i] = -255;
          2: x[b][i] = (((i / 8) + (i % 8)) % 2 == 0) ? 255 : -255;
          default: x[b][i] = int'($urandom_range(510)) - 255;
        endcase
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < SER_W; k++) begin
        @(negedge clk);
        valid = 1; first = (k == 0); last = (k == SER_W - 1);
        for (int i = 0; i < NN; i++) plane[i] = x[b][i][(k < IN_W) ? k : IN_W - 1];
        if (last) last_cyc[b] = cyc;
      end
      // idle gap, as between blocks in the chip
      repeat (b % 3) begin @(negedge clk); valid = 0; first = 0; last = 0; end
    end
    @(negedge clk); valid = 0; first = 0; last = 0;
  end

  always @(posedge clk) if (rst_n && y_valid) begin
    checks++;
    if (cyc - last_cyc[got] != 3) begin failures++; $display("LATENCY %0d", cyc - last_cyc[got]); end
    for (int k1 = 0; k1 < N; k1++)
      for (int k2 = 0; k2 < N; k2++) begin
        real yr, e;
        yr = 0.0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            yr += x[got][N*i+j] * $cos(PI * (2 * i + 1) * k1 / 16.0) * $cos(PI * (2 * j + 1) * k2 / 16.0);
        e = $itor(coef[k1][k2]) - yr;
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > 12.0) begin
          failures++;
          if (failures < 10) $display("block %0d Y[%0d][%0d] = %0d expected %f", got, k1, k2, coef[k1][k2], yr);
        end
      end
    got++;
  end

  // bit-plane read-out check, between blocks
  initial begin
    wait (got == NB);
    for (int k = 0; k < OUT_W; k++) begin
      @(negedge clk);
      plane_sel = 4'(k);
      #1;
      for (int i = 0; i < NN; i++) begin
        checks++;
        if (y_plane[i] != coef[i / N][i % N][k]) begin failures++; $display("plane %0d bit %0d wrong", k, i); end
      end
    end
    $display("max error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 20 + 200) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
