// tb_dct_post -- tests the routing and combination network on its own.
// For each test block x (extreme and random 9-bit blocks) the testbench
// builds the network's inputs itself, in floating point: the permuted rows
// y[n1][t] of the direct method and r[t][b] = 16 * sum_n1 y cos(pi(4n1+1)b/16)
// rounded to the 4-fractional-bit input format. The network's outputs must
// match the 2-D DCT of x evaluated from its definition within 1.5 LSB (the
// effect of the rounded inputs plus output rounding).
module tb_dct_post;
  import dct_pkg::*;
  r_word_t   r [N][N];
  out_word_t y [N][N];
  int checks = 0, failures = 0;
  real max_err = 0.0;

  dct_post dut (.r, .y);

  localparam real PI = 3.14159265358979323846;

  function automatic int p(int n);
    return (n < 4) ? 2 * n : 15 - 2 * n;
  endfunction

  int x [N][N];

  task automatic run_block();
    real yr;
    for (int t = 0; t < N; t++)
      for (int b = 0; b < N; b++) begin
        real s;
        s = 0.0;
        for (int n1 = 0; n1 < N; n1++) begin
          int n2;
          // 4*n2 + 1 = (4t+1)(4n1+1) mod 32
          n2 = ((((4 * t + 1) * (4 * n1 + 1)) % 32) - 1) / 4;
          s += x[p(n1)][p(n2)] * $cos(PI * (4 * n1 + 1) * b / 16.0);
        end
        r[t][b] = r_word_t'(int'($floor(s * 16.0 + 0.5)));
      end
    #1;
    for (int k1 = 0; k1 < N; k1++)
      for (int k2 = 0; k2 < N; k2++) begin
        real e;
        yr = 0.0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            yr += x[i][j] * $cos(PI * (2 * i + 1) * k1 / 16.0) * $cos(PI * (2 * j + 1) * k2 / 16.0);
        e = $itor(y[k1][k2]) - yr;
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > 1.5) begin
          failures++;
          if (failures < 10) $display("Y[%0d][%0d] = %0d expected %f", k1, k2, y[k1][k2], yr);
        end
      end
  endtask

  initial begin
    for (int blk = 0; blk < 60; blk++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          case (blk)
            0: x[i][j] = 255;
            1: x[i][j] = -255;
            2: x[i][j] = ((i + j) % 2 == 0) ? 255 : -255;
            3: x[i][j] = (i == 0 && j == 0) ? 255 : 0;
            default: x[i][j] = int'($urandom_range(510)) - 255;
          endcase
      run_block();
    end
    $display("max error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
