// dct_da_rom -- power-saving look-up ROM of one distributed-arithmetic unit.
//
// Holds the 2^4 pre-computed partial sums for output B of a 1-D transform:
// word[addr] = sum of cos(pi(4n+1)B/16) over the address bits n that are set,
// in ROM_W-bit two's complement with ROM_FRAC fractional bits (dct_pkg).
// The table is computed at elaboration from the cosine constants.
//
// Power saving: the source ROM is precharged and evaluates only when an
// address transition detector (ATD) sees its address change, and an output
// latch holds the last word. This model keeps that behaviour at clock level:
// 'eval' is the ATD output (address differs from the last evaluated one), the
// word is read and latched into 'data' only on such cycles, and otherwise the
// array is not accessed. Because the latch always holds the word of the last
// evaluated address, 'data' equals word[addr] one clock after addr is applied.
//
// Interface: addr (4 bits) -> data (ROM_W bits, registered), eval (ATD pulse).
module dct_da_rom
  import dct_pkg::*;
#(
  parameter int B = 1   // output index 0..N-1 this ROM serves
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      addr,
  output rom_word_t       data,
  output logic            eval
);
  rom_word_t table_w [16];

  for (genvar i = 0; i < 16; i++) begin : g_word
    localparam int WV = rom_word(B, i);
    assign table_w[i] = rom_word_t'(WV);
  end

  logic [3:0] addr_q;

  assign eval = (addr != addr_q);   // address transition detection

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      data   <= '0;                 // word[0] is 0 for every B
    end else if (eval) begin
      addr_q <= addr;
      data   <= table_w[addr];
    end
  end
endmodule
