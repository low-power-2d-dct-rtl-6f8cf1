// tb_dct_da_unit -- drives every DA unit (B = 0..7) with the same random
// 4-tuples of 10-bit inputs, bit-serially and back to back, and compares each
// result with the real inner product sum_n u_n cos(pi(4n+1)B/16). The
// allowed error, 2.1, is the bound set by the 8-fractional-bit ROM words
// (2^-9 per word, weighted by 1 + 2 + ... + 2^9) plus output rounding.
// It also checks that res_valid comes exactly two cycles after 'last'.
module tb_dct_da_unit;
  import dct_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] addr;
  logic valid, first, last;
  r_word_t result [N];
  logic [N-1:0] res_valid, rom_eval;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;

  for (genvar b = 0; b < N; b++) begin : g_da
    dct_da_unit #(.B(b)) dut (.clk, .rst_n, .addr, .valid, .first, .last,
      .result(result[b]), .res_valid(res_valid[b]), .rom_eval(rom_eval[b]));
  end

  localparam int NW = 300;
  int u [NW][4];
  int got = 0;
  longint cyc = 0, last_cyc [NW];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    valid = 0; first = 0; last = 0; addr = 0;
    for (int w = 0; w < NW; w++)
      for (int n = 0; n < 4; n++)
        u[w][n] = (w == 0) ? 510 : (w == 1) ? -510 : int'($urandom_range(1020)) - 510;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      if (w % 7 == 3) begin @(negedge clk); valid = 0; first = 0; last = 0; end
      for (int i = 0; i < SER_W; i++) begin
        @(negedge clk);
        valid = 1; first = (i == 0); last = (i == SER_W - 1);
        for (int n = 0; n < 4; n++) addr[n] = u[w][n][i];
        if (last) last_cyc[w] = cyc;
      end
    end
    @(negedge clk); valid = 0; first = 0; last = 0;
  end

  always @(posedge clk) if (rst_n && res_valid[0]) begin
    checks++;
    if (cyc - last_cyc[got] != 2) begin failures++; $display("LATENCY %0d", cyc - last_cyc[got]); end
    for (int b = 0; b < N; b++) begin
      real r, e;
      r = 0.0;
      for (int n = 0; n < 4; n++) r += u[got][n] * $cos(3.14159265358979323846 * (4 * n + 1) * b / 16.0);
      e = $itor(result[b]) / 16.0 - r;
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > 2.1 || !res_valid[b]) begin
        failures++;
        if (failures < 10) $display("B=%0d word %0d: %f expected %f", b, got, $itor(result[b]) / 16.0, r);
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
