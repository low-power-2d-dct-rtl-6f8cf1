// dct_manchester -- one stage of the DA accumulator adder: a W-bit adder
// built on a Manchester carry chain.
//
// Each bit forms generate g = a&b and propagate p = a^b; the carry into bit
// i+1 is g_i | (p_i & c_i), the function a Manchester chain evaluates with a
// single switched gate per bit. Here the chain is written as that recurrence,
// so it synthesises to a ripple chain. Sum bit i is p_i ^ c_i.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Purely combinational.
// In the carry-select adder every stage is instantiated twice, with cin tied
// to 0 and to 1 (the "Carry 0" / "Carry 1" inputs of the stage).
module dct_manchester #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g    = a & b;
  assign p    = a ^ b;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_chain
    assign c[i+1] = g[i] | (p[i] & c[i]);
  end
  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
