// tb_spy_sma_ctrl -- exhaustive check of the SPYDER-T strobes: word
// strobes only under grant, SMA-space flag for SPYA23..19 = 11111 with the
// grant, chip select from the read or address strobe.
// Combinational; outputs checked 1 ns after each vector.  The decodes
// follow the interface's SPYDER-T strobe device.
module tb_spy_sma_ctrl;
  logic spybg_n, spywe_n, spyrd_n, spyas_n;
  logic [4:0] spya;
  logic smwe_n, smwo_n, smre_n, smro_n, spysmsp_n, spysmcs_n;
  int checks = 0, failures = 0;

  spy_sma_ctrl dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      {spybg_n, spywe_n, spyrd_n, spyas_n, spya} = 9'(i);
      #1;
      check("we", smwe_n == (spybg_n || spywe_n));
      check("wo", smwo_n == (spybg_n || spywe_n));
      check("re", smre_n == (spybg_n || spyrd_n));
      check("ro", smro_n == (spybg_n || spyrd_n));
      check("sp", spysmsp_n == !(spybg_n == 1'b0 && spya == 5'h1F));
      check("cs", spysmcs_n == (spyrd_n && spyas_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
