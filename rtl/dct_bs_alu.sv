// dct_bs_alu -- 1-bit ALU: bit-serial two's-complement adder/subtractor.
//
// Operands arrive LSB first, one bit per clock while 'en' is high; 'first'
// marks the LSB. The result bit is produced combinationally in the same
// cycle (s = a ^ b' ^ c) and the carry is kept in a flip-flop for the next
// bit. For subtraction (sub = 1) operand b is inverted and the carry of the
// LSB starts at 1, giving a - b.
//
// Used as the input butterfly of each 1-D transform (y_n + y_{n+4} and
// y_n - y_{n+4}). The source design lists 1-bit ALUs among its components but
// does not describe them; this serial add/subtract cell is this design's own.
module dct_bs_alu (
  input  logic clk,
  input  logic rst_n,
  input  logic en,      // a bit is presented this cycle
  input  logic first,   // this is the LSB of a new word
  input  logic sub,     // 0: a + b, 1: a - b
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q, cin, bb;

  always_comb begin
    bb  = b ^ sub;
    cin = first ? sub : carry_q;
    s   = a ^ bb ^ cin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= (a & bb) | (a & cin) | (bb & cin);
  end
endmodule
