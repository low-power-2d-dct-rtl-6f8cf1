// tb_dct_bs_alu -- feeds random 10-bit two's-complement operand pairs LSB
// first, back to back, to an adding and a subtracting 1-bit ALU and
// reassembles the serial results; they must equal a + b and a - b modulo
// 2^10. Operands are drawn from -255..255, the butterfly's input range.
module tb_dct_bs_alu;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, first, a, b, s_add, s_sub;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct_bs_alu u_add (.clk, .rst_n, .en, .first, .sub(1'b0), .a, .b, .s(s_add));
  dct_bs_alu u_sub (.clk, .rst_n, .en, .first, .sub(1'b1), .a, .b, .s(s_sub));

  initial begin
    en = 0; first = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 500; w++) begin
      logic [W-1:0] va, vb, ra, rs;
      va = W'(int'($urandom_range(510)) - 255);
      vb = W'(int'($urandom_range(510)) - 255);
      if (w == 0) begin va = W'(255); vb = W'(255); end
      if (w == 1) begin va = W'(-255); vb = W'(255); end
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        en = 1; first = (i == 0); a = va[i]; b = vb[i];
        #1;
        ra[i] = s_add; rs[i] = s_sub;
      end
      checks += 2;
      if (ra != va + vb) begin failures++; $display("ADD %0d + %0d -> %0d", $signed(va), $signed(vb), $signed(ra)); end
      if (rs != va - vb) begin failures++; $display("SUB %0d - %0d -> %0d", $signed(va), $signed(vb), $signed(rs)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
