// tb_dct_ctrl -- cycle-level test of the controller schedule. The core is
// emulated by a y_valid pulse three cycles after core_last, as the real core
// does. For every completed input block (cycle L, the 64th accepted sample)
// the testbench expects:
//   L+1..L+10   input reads of the filled bank, columns 0..8 then 8 again;
//   L+2..L+11   core_valid, core_first at L+2, core_last at L+11;
//   L+15..L+30  output-buffer writes, rows (= plane_sel) 0..15;
//   L+31..L+94  output reads, addresses 0..63, out_valid one cycle later.
// It also checks the input write address/bank sequence with idle cycles in
// the stream, alternation of banks on both sides, and that 'overrun' rises
// when a second y_valid pulse arrives while the output writer is busy.
module tb_dct_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic in_we, in_wbank, in_re, in_rbank;
  logic [5:0] in_waddr, out_raddr;
  logic [3:0] in_rcol, plane_sel, out_wrow;
  logic core_valid, core_first, core_last, core_y_valid;
  logic out_we, out_wbank, out_re, out_rbank, out_valid, blk_start, overrun;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct_ctrl dut (.*);

  // core emulation: y_valid three cycles after core_last
  logic [2:0] lastd = '0;
  logic force_y;
  always @(posedge clk) if (rst_n) lastd <= {lastd[1:0], core_last};
  assign core_y_valid = lastd[2] | force_y;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint lastL = -1000, prevL = -1000;

  // offset of this cycle from the latest completed block whose window
  // [lo, hi] contains it, or -1
  function automatic longint win(longint lo, longint hi);
    if (cyc - lastL >= lo && cyc - lastL <= hi) return cyc - lastL;
    if (cyc - prevL >= lo && cyc - prevL <= hi) return cyc - prevL;
    return -1;
  endfunction
  int nblk = 0, exp_addr = 0;
  logic exp_wbank = 0, exp_rbank_in = 0, exp_wbank_out = 0, exp_rbank_out = 0;
  logic checking = 1;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) if (rst_n && checking) begin
    longint d;
    // input writer
    chk(in_we == in_valid, "in_we");
    if (in_valid) begin
      chk(in_waddr == 6'(exp_addr) && in_wbank == exp_wbank, "input write address/bank");
      exp_addr = (exp_addr + 1) % 64;
    end
    // plane reader
    d = win(1, 10);
    chk(in_re == (d >= 0), "in_re window");
    if (d >= 0)
      chk(in_rcol == 4'((d - 1 > 8) ? 8 : d - 1) && in_rbank == exp_rbank_in, "in_rcol/in_rbank");
    chk(core_valid == (win(2, 11) >= 0), "core_valid window");
    chk(core_first == (win(2, 2) >= 0), "core_first");
    chk(core_last == (win(11, 11) >= 0), "core_last");
    // output writer
    d = win(15, 30);
    chk(out_we == (d >= 0), "out_we window");
    if (d >= 0)
      chk(out_wrow == 4'(d - 15) && plane_sel == out_wrow && out_wbank == exp_wbank_out, "out_wrow/bank");
    if (d == 30) exp_wbank_out = ~exp_wbank_out;
    // output reader
    d = win(31, 94);
    chk(out_re == (d >= 0), "out_re window");
    if (d >= 0)
      chk(out_raddr == 6'(d - 31) && out_rbank == exp_rbank_out, "out_raddr/bank");
    if (d == 94) exp_rbank_out = ~exp_rbank_out;
    chk(out_valid == (win(32, 95) >= 0), "out_valid window");
    chk(!overrun, "overrun");
    if (in_valid && exp_addr == 0) begin   // this cycle accepted sample 63
      prevL = lastL;
      lastL = cyc;
      exp_rbank_in = exp_wbank;
      exp_wbank = ~exp_wbank;
      nblk++;
    end
  end

  int swaps_in = 0, swaps_out = 0;
  always @(posedge clk) begin
    if (in_valid && in_waddr == 63) swaps_in++;
    if (out_we && out_wrow == 15) swaps_out++;
  end

  initial begin
    in_valid = 0; force_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // six blocks; blocks 2 and 3 with idle cycles
    for (int b = 0; b < 6; b++) begin
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        in_valid = 1;
        if ((b == 2 || b == 3) && $urandom_range(2) == 0) begin
          in_valid = 0; i--;
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (120) @(negedge clk);
    checks++;
    if (nblk != 6 || swaps_in != 6 || swaps_out != 6) begin
      failures++; $display("blocks %0d swaps %0d/%0d", nblk, swaps_in, swaps_out);
    end
    // overrun: a second y_valid while the writer is busy
    checking = 0;
    force_y = 1; @(negedge clk); force_y = 0;
    repeat (3) @(negedge clk);
    force_y = 1; @(negedge clk); force_y = 0;
    @(negedge clk);
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
