// dct_csel_adder -- square-root carry-select adder, the accumulator adder of
// every distributed-arithmetic unit.
//
// The WIDTH-bit addition is cut into NSTAGE stages whose widths grow towards
// the MSB (2, 3, 4, 4 bits for the 13-bit adder: bits 0-1, 2-4, 5-8, 9-12).
// Every stage holds two Manchester adders, one assuming a carry-in of 0 and
// one of 1; a multiplexer chain driven by the real carry picks the sum and the
// carry-out of each stage. Only the short mux chain lies on the critical path,
// which is what lets the adder run at reduced supply voltage.
//
// Interface: a, b (WIDTH bits), ci -> sum (WIDTH bits), co. Combinational.
// The stage split follows the source design's adder figure; the first stage
// also uses the select structure, as drawn there.
module dct_csel_adder #(
  parameter int WIDTH            = 13,
  parameter int NSTAGE           = 4,
  parameter int STAGE_W [NSTAGE] = '{2, 3, 4, 4}
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] sum,
  output logic             co
);
  // lowest bit of stage s
  function automatic int stage_lo(input int s);
    int lo;
    lo = 0;
    for (int i = 0; i < s; i++) lo += STAGE_W[i];
    return lo;
  endfunction

  logic [NSTAGE:0] c;   // carry into each stage
  assign c[0] = ci;

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    localparam int LO = stage_lo(s);
    localparam int SW = STAGE_W[s];
    logic [SW-1:0] s0, s1;
    logic          c0, c1;

    dct_manchester #(.W(SW)) u_carry0 (
      .a(a[LO +: SW]), .b(b[LO +: SW]), .cin(1'b0), .sum(s0), .cout(c0));
    dct_manchester #(.W(SW)) u_carry1 (
      .a(a[LO +: SW]), .b(b[LO +: SW]), .cin(1'b1), .sum(s1), .cout(c1));

    assign sum[LO +: SW] = c[s] ? s1 : s0;
    assign c[s+1]        = c[s] ? c1 : c0;
  end

  assign co = c[NSTAGE];

  initial begin
    assert (stage_lo(NSTAGE) == WIDTH)
      else $error("dct_csel_adder: stage widths must add up to WIDTH");
  end
endmodule
