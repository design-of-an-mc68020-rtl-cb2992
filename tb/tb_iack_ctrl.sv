// tb_iack_ctrl -- exhaustive check of the acknowledge steering and HIFI-64
// strobes, then the timer request flip-flop: set by a rising TIMER edge,
// cleared by the channel 1 acknowledge and by reset, and not set again
// until the next tick.
// Combinational part checked 1 ns after each vector; the flip-flop is
// stepped with 5 ns between TIMER edges and checked 1 ns after each.  The decodes follow the
// interface's acknowledge device.
module tb_iack_ctrl;
  logic rst_n = 1, cpiack_n = 1, bimrst_n = 1, intae_n = 1, hifics_n = 1, cpds_n = 1, cprw_n = 1;
  logic timer = 0;
  logic [1:0] intal = 0;
  logic biack_n, mfpie_n, clrtm1_n, clrspia_n, hifr_n, hifw_n, tmrirq_n;
  int checks = 0, failures = 0;

  iack_ctrl dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1 rst_n = 0;
    #1 rst_n = 1;
    check("timer clear after reset", tmrirq_n);
    for (int i = 0; i < 128; i++) begin
      {cpiack_n, bimrst_n, intae_n, intal, hifics_n, cpds_n} = 7'(i);
      cprw_n = 1'($urandom);
      #1;
      check("biack", biack_n == !(!cpiack_n || !bimrst_n));
      check("ch0 -> mfp", mfpie_n == !(!intae_n && intal == 0));
      check("ch1 -> timer clear", clrtm1_n == !(!intae_n && intal == 1));
      check("ch2 -> spyia clear", clrspia_n == !(!intae_n && intal == 2));
      check("hifi read", hifr_n == !(!hifics_n && !cpds_n && cprw_n));
      check("hifi write", hifw_n == !(!hifics_n && !cpds_n && !cprw_n));
    end
    intae_n = 1; intal = 0;
    for (int i = 0; i < 200; i++) begin
      #5 timer = 1;
      #1 check("tick sets request", !tmrirq_n);
      #5 timer = 0;
      #1 check("held after tick", !tmrirq_n);
      if (i % 3 == 0) begin
        rst_n = 0;
        #1 check("reset clears", tmrirq_n);
        rst_n = 1;
      end else begin
        intal = 2'b01; intae_n = 0;
        #1 check("ch1 acknowledge clears", tmrirq_n);
        intae_n = 1;
        intal = 2'($urandom % 2 ? 0 : 2);
        intae_n = 0;
        #1 intae_n = 1;
      end
      #1 check("stays clear until next tick", tmrirq_n);
    end
    // another channel's acknowledge must not clear the timer request
    #5 timer = 1; #5 timer = 0;
    intal = 2'b10; intae_n = 0;
    #1 check("ch2 does not clear timer", !tmrirq_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
