// tb_dct_csel_adder -- tests the 13-bit square-root carry-select adder with
// carries rippling across every stage boundary (all-ones plus one, and each
// stage boundary) and with random operands, against a + b + ci.
module tb_dct_csel_adder;
  localparam int W = 13;
  logic [W-1:0] a, b, sum;
  logic ci, co;
  int checks = 0, failures = 0;

  dct_csel_adder dut (.*);

  task automatic check();
    #1;
    checks++;
    if ({co, sum} != (W+1)'(a) + (W+1)'(b) + (W+1)'(ci)) begin
      failures++;
      if (failures < 10) $display("MISMATCH %0d + %0d + %0d = %0d", a, b, ci, {co, sum});
    end
  endtask

  initial begin
    a = '1; b = '0; ci = 1'b1; check();
    a = '1; b = 13'd1; ci = 1'b0; check();
    a = '1; b = '1; ci = 1'b1; check();
    for (int k = 0; k < W; k++) begin
      a = W'((1 << k) - 1); b = W'(1); ci = 1'b0; check();
      a = W'((1 << k) - 1); b = '0; ci = 1'b1; check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = W'($urandom); b = W'($urandom); ci = 1'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
