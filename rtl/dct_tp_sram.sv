// dct_tp_sram -- two-port SRAM with different write and read port widths,
// used as a transpose (data-reordering) buffer.
//
// The array is ROWS x COLS bits. The write port stores one whole row of COLS
// bits; the read port returns one whole column of ROWS bits, bit r of the
// result being bit 'rd_col' of row r. Writing along rows and sensing along
// columns turns word-serial data into bit-serial, word-parallel data and
// back:
//   input buffer  ROWS = 64, COLS = 9:  a 9-bit sample per write, one bit
//                 plane of all 64 samples per read (n = 9, m = 64);
//   output buffer ROWS = 16, COLS = 64: one bit plane of all 64 coefficients
//                 per write, one 16-bit coefficient per read (n = 64, m = 16).
// Both ports are synchronous to clk; read data appear the clock after rd_en
// and hold until the next read. A read and a write of the same location in
// one cycle return the old contents (not used by the ping-pong schedule).
// The array has no reset; the read register resets to zero.
module dct_tp_sram #(
  parameter int ROWS = 64,
  parameter int COLS = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  logic [COLS-1:0]         wr_data,
  input  logic                    rd_en,
  input  logic [$clog2(COLS)-1:0] rd_col,
  output logic [ROWS-1:0]         rd_data
);
  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data <= '0;
    else if (rd_en)
      for (int r = 0; r < ROWS; r++) rd_data[r] <= mem[r][rd_col];
  end

  initial assert (COLS > 1 && ROWS > 1) else $error("dct_tp_sram: ROWS and COLS must exceed 1");
endmodule
