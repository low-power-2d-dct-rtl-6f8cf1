// dct_bank_mux -- ping-pong bank select: passes the read data of bank 1 when
// 'sel' is high, otherwise that of bank 0. Used after the two input SRAMs
// (64 bits) and after the two output SRAMs (16 bits). Combinational.
module dct_bank_mux #(
  parameter int W = 64
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] q
);
  assign q = sel ? d1 : d0;
endmodule
