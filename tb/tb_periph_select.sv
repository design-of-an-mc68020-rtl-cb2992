// tb_periph_select -- checks the peripheral cycle delay and the device
// selects.  Each trial ends the previous cycle (address strobe high, which
// must clear both delay registers), starts a cycle at a random register
// address with or without the peripheral space, asserts the data strobe and
// checks that PERIFCSL goes active exactly on the second PERIFCLK rising
// edge, and that the device selects match the address map written as
// address ranges.
module tb_periph_select;
  logic perifclk = 0, perifsel_n = 1, bimrst_n = 1, cp0as_n = 0, cp0ds_n = 1;
  logic [7:0] mpab = 0;
  logic cpds1_n, perifcs_n, mfpcs_n, bimcs_n, hifics_n, uartcs_n, cpuirs_n, cr0s_n, cr1s_n;
  logic irs_n, gpstat_n, perifdk_n;
  int checks = 0, failures = 0;

  periph_select dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #30 perifclk = !perifclk;

  task automatic decodes(logic active);
    logic s;
    s = active && !cp0as_n;
    check("mfp", mfpcs_n == !(s && mpab < 8'h18));
    check("bim", bimcs_n == !((s && mpab >= 8'h30 && mpab <= 8'h3F && mpab[0]) || !bimrst_n));
    check("hifi", hifics_n == !(s && mpab >= 8'h80 && mpab <= 8'h8F));
    check("uart", uartcs_n == !(s && mpab >= 8'hC0 && mpab <= 8'hCF));
    check("irr", cpuirs_n == !(s && mpab == 8'hF0));
    check("cr0", cr0s_n == !(s && mpab == 8'hF2));
    check("cr1", cr1s_n == !(s && mpab == 8'hF4));
    check("isr", irs_n == !(s && mpab == 8'hF6));
    check("gpstat", gpstat_n == !(s && mpab == 8'hF8));
    check("perifdk", perifdk_n == !(s && mpab >= 8'hF0 && !mpab[0]));
  endtask

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic inspace;
      @(negedge perifclk);
      cp0as_n = 1; cp0ds_n = 1;
      #1 check("cleared by AS", cpds1_n && perifcs_n);
      decodes(0);
      inspace = ($urandom % 4) != 0;
      perifsel_n = !inspace;
      bimrst_n = ($urandom % 8) != 0;
      case ($urandom % 4)
        0: mpab = 8'hF0 + 8'(2 * ($urandom % 5));
        1: mpab = 8'($urandom % 8'h40);
        default: mpab = 8'($urandom);
      endcase
      cp0as_n = 0;
      @(posedge perifclk); #1;
      check("no select before DS", perifcs_n && cpds1_n);
      @(negedge perifclk); cp0ds_n = 0;
      @(posedge perifclk); #1;
      check("DS registered", cpds1_n == !inspace);
      check("one edge: not yet", perifcs_n);
      decodes(0);
      @(posedge perifclk); #1;
      check("second edge", perifcs_n == !inspace);
      decodes(inspace);
      @(posedge perifclk); #1;
      check("held", perifcs_n == !inspace);
      decodes(inspace);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
