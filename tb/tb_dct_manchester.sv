// tb_dct_manchester -- exhaustive test of a 4-bit Manchester adder stage:
// every a, b and carry-in, sum and carry-out compared with a + b + cin.
module tb_dct_manchester;
  logic [3:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  dct_manchester #(.W(4)) dut (.*);

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, sum} != 5'(a) + 5'(b) + 5'(cin)) begin
        failures++;
        $display("MISMATCH %0d + %0d + %0d = %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
