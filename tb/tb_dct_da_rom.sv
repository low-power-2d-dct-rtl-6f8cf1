// tb_dct_da_rom -- checks the look-up ROMs of all eight outputs (B = 0..7).
// For random address sequences (with repeats) every word read is compared
// with round(256 * sum of cos(pi(4n+1)B/16) over the set address bits),
// computed here in floating point. The address-transition output must pulse
// exactly when the address differs from the previous evaluated one, and the
// word must stay latched while the address is unchanged.
module tb_dct_da_rom;
  import dct_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] addr;
  rom_word_t data [N];
  logic [N-1:0] eval;
  int checks = 0, failures = 0, skipped = 0;

  always #5 clk = ~clk;

  for (genvar b = 0; b < N; b++) begin : g_rom
    dct_da_rom #(.B(b)) dut (.clk, .rst_n, .addr, .data(data[b]), .eval(eval[b]));
  end

  function automatic int ref_word(int b, int a);
    real s;
    s = 0.0;
    for (int n = 0; n < 4; n++)
      if (a[n]) s += $cos(3.14159265358979323846 * (4 * n + 1) * b / 16.0);
    return int'($floor(s * 256.0 + 0.5));
  endfunction

  initial begin
    logic [3:0] prev;
    addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      addr = ($urandom_range(2) == 0) ? prev : 4'($urandom);
      #1;
      checks++;
      if (eval != ((addr != prev) ? '1 : '0)) begin failures++; $display("ATD wrong at %0d", i); end
      if (addr == prev) skipped++;
      @(posedge clk); #1;
      for (int b = 0; b < N; b++) begin
        checks++;
        if (int'(data[b]) != ref_word(b, int'(addr))) begin
          failures++;
          $display("ROM B=%0d addr=%0d: %0d, expected %0d", b, addr, data[b], ref_word(b, int'(addr)));
        end
      end
      prev = addr;
    end
    checks++;
    if (skipped == 0) begin failures++; $display("no repeated address"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
