// tb_host_ee_cs -- exhaustive check of the program EEPROM selects (bank by
// A17, even byte for A0 = 0, odd byte for odd address or wider transfer)
// and of the DSACK-grant reset.
// Purely combinational: each vector is applied, then checked 1 ns later.
// Bank and lane rules follow the program EEPROM sheet and the MC68020
// 16-bit port rule.
module tb_host_ee_cs;
  logic cp0as_n, mpab17, mpab0, cpsmbr1_n;
  logic [4:0] mpab_hi;
  logic [1:0] mpsize;
  logic cpeuecs_n, cpelecs_n, cpeuocs_n, cpelocs_n, cpees_n, cpdkrst_n;
  int checks = 0, failures = 0;

  host_ee_cs dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) begin
      logic sp, ev, od;
      {cp0as_n, mpab_hi, mpab17, mpab0, mpsize, cpsmbr1_n} = 11'(i);
      #1;
      sp = !cp0as_n && mpab_hi == 5'b00000;
      ev = sp && !mpab0;
      od = sp && (mpab0 || mpsize != 2'b01);
      check("ue", cpeuecs_n == !(ev && mpab17));
      check("le", cpelecs_n == !(ev && !mpab17));
      check("uo", cpeuocs_n == !(od && mpab17));
      check("lo", cpelocs_n == !(od && !mpab17));
      check("any", cpees_n == !(ev || od));
      check("dkrst", cpdkrst_n == (!cp0as_n && !cpsmbr1_n));
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
