// tb_dct_bank_mux -- random data on both banks, both select values; the
// output must equal the selected bank.
module tb_dct_bank_mux;
  logic sel;
  logic [63:0] d0, d1, q;
  int checks = 0, failures = 0;

  dct_bank_mux #(.W(64)) dut (.*);

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = {$urandom, $urandom}; d1 = {$urandom, $urandom}; sel = 1'(i);
      #1;
      checks++;
      if (q != (sel ? d1 : d0)) begin failures++; $display("MISMATCH sel=%0d", sel); end
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
