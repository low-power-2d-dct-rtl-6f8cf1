// tb_dct_cplx_1d -- sends random 8-sample rows (9-bit, -255..255, plus
// full-scale rows) bit-serially through one 1-D transform and compares the
// eight outputs with R(b) = sum_n y_n cos(pi(4n+1)b/16) in floating point.
// Tolerance 2.2: the ROM quantisation bound of one DA unit plus rounding.
// Checks that all results arrive two cycles after 'last'.
module tb_dct_cplx_1d;
  import dct_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] y_bit, rom_eval;
  logic valid, first, last, res_valid;
  r_word_t r [N];
  int checks = 0, failures = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;

  dct_cplx_1d dut (.*);

  localparam int NW = 300;
  int y [NW][N];
  int got = 0;
  longint cyc = 0, last_cyc [NW];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    valid = 0; first = 0; last = 0; y_bit = 0;
    for (int w = 0; w < NW; w++)
      for (int n = 0; n < N; n++)
        case (w)
          0: y[w][n] = 255;
          1: y[w][n] = -255;
          2: y[w][n] = (n < 4) ? 255 : -255;
          3: y[w][n] = (n % 2 == 0) ? 255 : -255;
          default: y[w][n] = int'($urandom_range(510)) - 255;
        endcase
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      for (int i = 0; i < SER_W; i++) begin
        @(negedge clk);
        valid = 1; first = (i == 0); last = (i == SER_W - 1);
        for (int n = 0; n < N; n++) y_bit[n] = y[w][n][(i < IN_W) ? i : IN_W - 1];
        if (last) last_cyc[w] = cyc;
      end
    end
    @(negedge clk); valid = 0; first = 0; last = 0;
  end

  always @(posedge clk) if (rst_n && res_valid) begin
    checks++;
    if (cyc - last_cyc[got] != 2) begin failures++; $display("LATENCY %0d", cyc - last_cyc[got]); end
    for (int b = 0; b < N; b++) begin
      real ref_v, e;
      ref_v = 0.0;
      for (int n = 0; n < N; n++) ref_v += y[got][n] * $cos(3.14159265358979323846 * (4 * n + 1) * b / 16.0);
      e = $itor(r[b]) / 16.0 - ref_v;
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > 2.2) begin
        failures++;
        if (failures < 10) $display("row %0d R(%0d) = %f expected %f", got, b, $itor(r[b]) / 16.0, ref_v);
      end
    end
    got++;
    if (got == NW) begin
      $display("max error %f", max_err);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NW * 20 + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
