// tb_mlc_dtack -- T7130 acknowledge timing.  Reads of the LAPD EEPROM start
// at a random point of the 4 MHz MFPCLK period; DTACK must appear on the
// second MFPCLK rising edge after the read strobe, which is checked both
// as an edge count and as a time of 250 to 500 ns (the interface asks for
// at least 250 ns).  CSA accesses must be acknowledged at once, and the
// acknowledge must end with the strobe.
module tb_mlc_dtack;
  logic mfpclk = 0, mlceer_n = 0, mlcesp_n = 1, sram_dtack_n = 1;
  logic mlcdtk1_n, mlcdtack_n;
  int checks = 0, failures = 0;

  mlc_dtack dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #125 mfpclk = !mfpclk;   // 4 MHz, time unit ns

  initial begin
    #1 mlceer_n = 1;
    for (int i = 0; i < 400; i++) begin
      int edges;
      time t0;
      #(1 + $urandom % 300);
      while ($time % 125 == 0 || $time % 125 == 124) #1;   // keep clear of clock edges
      if ($urandom % 4 == 0) begin
        // CSA: zero wait states
        sram_dtack_n = 0; mlceer_n = 0; mlcesp_n = 1;
        #1 check("csa dtack at once", !mlcdtack_n);
        #100 sram_dtack_n = 1; mlceer_n = 1;
        #1 check("csa dtack ends", mlcdtack_n);
        continue;
      end
      mlcesp_n = 0; mlceer_n = 0; t0 = $time; edges = 0;
      #1 check("no dtack at strobe", mlcdtack_n);
      while (mlcdtack_n && edges < 5) begin
        @(posedge mfpclk); edges++;
        #1 check("dtack only from 2nd edge", mlcdtack_n == (edges < 2));
      end
      check("two MFPCLK edges", edges == 2);
      check("at least 250 ns", $time - t0 >= 250);
      check("at most 500 ns", $time - t0 <= 501);
      #(1 + $urandom % 200);
      mlceer_n = 1;
      #1 check("dtack ends with strobe", mlcdtack_n && mlcdtk1_n);
      mlcesp_n = 1;
      // EEPROM space without a read strobe never acknowledges
      mlcesp_n = 0;
      @(posedge mfpclk); @(posedge mfpclk); @(posedge mfpclk);
      #1 check("no read, no dtack", mlcdtack_n);
      mlcesp_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
