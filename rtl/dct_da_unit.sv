// dct_da_unit -- one distributed-arithmetic (DA) inner-product unit.
//
// Computes R = sum_{n=0}^{3} c_n u_n for four bit-serial two's-complement
// inputs u_n (SER_W bits, LSB first) and the fixed coefficients of output B
// (see dct_da_rom). Each cycle the four current input bits form the ROM
// address; the addressed partial sum is added to the accumulator, and for the
// sign bit (last cycle) it is subtracted. The accumulator is shifted right one
// place per bit; the bit shifted out is kept in a low-order shift register,
// so the 13-bit adder (dct_csel_adder) gives an exact result for the
// quantised ROM words:
//   R * 2^ROM_FRAC = sum_i w_i 2^i ROM[bits_i],  w_i = -1 for the sign bit.
// The result is rounded to R_FRAC fractional bits.
//
// Timing: addr/valid/first/last are presented together, one bit per cycle,
// SER_W cycles per word ('first' with the LSB, 'last' with the sign bit).
// The ROM adds one cycle; 'res_valid' pulses, with 'result', two cycles after
// the cycle that carried 'last'. A new word may start right after 'last'.
module dct_da_unit
  import dct_pkg::*;
#(
  parameter int B = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] addr,
  input  logic       valid,
  input  logic       first,
  input  logic       last,
  output r_word_t    result,
  output logic       res_valid,
  output logic       rom_eval     // ROM address-transition pulse (activity monitor)
);
  localparam int LO_W   = SER_W - 1;
  localparam int FULL_W = ACC_W + LO_W;

  rom_word_t rom_q;
  logic      valid_d, first_d, last_d;

  dct_da_rom #(.B(B)) u_rom (
    .clk(clk), .rst_n(rst_n), .addr(addr), .data(rom_q), .eval(rom_eval));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_d <= 1'b0;
      first_d <= 1'b0;
      last_d  <= 1'b0;
    end else begin
      valid_d <= valid;
      first_d <= first & valid;
      last_d  <= last & valid;
    end
  end

  logic signed [ACC_W-1:0] acc_q, op_a, op_b, s;
  logic        [LO_W-1:0]  lo_q;
  logic                    co_unused;

  assign op_a = first_d ? '0 : acc_q;
  assign op_b = last_d ? ~ACC_W'(rom_q) : ACC_W'(rom_q);   // rom_q sign-extends

  dct_csel_adder #(.WIDTH(ACC_W)) u_add (
    .a(op_a), .b(op_b), .ci(last_d), .sum(s), .co(co_unused));

  logic signed [FULL_W-1:0] full;
  logic signed [FULL_W:0]   rounded;
  assign full    = {s, lo_q};
  assign rounded = (FULL_W+1)'(full) + (FULL_W+1)'(1 << (ROM_FRAC - R_FRAC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      lo_q      <= '0;
      result    <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (valid_d) begin
        if (last_d) begin
          result    <= r_word_t'(rounded >>> (ROM_FRAC - R_FRAC));
          res_valid <= 1'b1;
        end else begin
          acc_q <= s >>> 1;
          lo_q  <= {s[0], lo_q[LO_W-1:1]};
        end
      end
    end
  end
endmodule
