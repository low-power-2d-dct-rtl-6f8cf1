// tb_dct_tp_sram -- tests both transpose-buffer shapes of the chip, 64x9
// (input) and 16x64 (output). Random rows are written through the write
// port, then every column is read through the read port and compared with a
// reference array, one cycle after the read. Three rounds, each overwriting
// every row, check that columns follow the latest writes.
module tb_dct_tp_sram;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // input buffer shape
  logic       a_we, a_re;
  logic [5:0] a_row;
  logic [8:0] a_wd;
  logic [3:0] a_col;
  logic [63:0] a_rd;
  dct_tp_sram #(.ROWS(64), .COLS(9)) dut_a (.clk, .rst_n, .wr_en(a_we), .wr_row(a_row),
    .wr_data(a_wd), .rd_en(a_re), .rd_col(a_col), .rd_data(a_rd));

  // output buffer shape
  logic        b_we, b_re;
  logic [3:0]  b_row;
  logic [63:0] b_wd;
  logic [5:0]  b_col;
  logic [15:0] b_rd;
  dct_tp_sram #(.ROWS(16), .COLS(64)) dut_b (.clk, .rst_n, .wr_en(b_we), .wr_row(b_row),
    .wr_data(b_wd), .rd_en(b_re), .rd_col(b_col), .rd_data(b_rd));

  logic [8:0]  ma [64];
  logic [63:0] mb [16];

  initial begin
    a_we = 0; a_re = 0; b_we = 0; b_re = 0; a_row = 0; a_col = 0; b_row = 0; b_col = 0; a_wd = 0; b_wd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      // writes
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        a_we = 1; a_row = 6'(i); a_wd = 9'($urandom); ma[i] = a_wd;
        b_we = (i < 16); b_row = 4'(i); b_wd = {$urandom, $urandom};
        if (i < 16) mb[i] = b_wd;
      end
      @(negedge clk); a_we = 0; b_we = 0;
      // column reads
      for (int c = 0; c < 64; c++) begin
        logic [63:0] ea;
        logic [15:0] eb;
        @(negedge clk);
        a_re = (c < 9); a_col = 4'(c % 9);
        b_re = 1; b_col = 6'(c);
        for (int r = 0; r < 64; r++) ea[r] = ma[r][c % 9];
        for (int r = 0; r < 16; r++) eb[r] = mb[r][c];
        @(negedge clk);
        a_re = 0; b_re = 0;
        if (c < 9) begin
          checks++;
          if (a_rd != ea) begin failures++; $display("64x9 column %0d wrong", c); end
        end
        checks++;
        if (b_rd != eb) begin failures++; $display("16x64 column %0d wrong", c); end
      end
    end
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
