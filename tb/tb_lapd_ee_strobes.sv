// tb_lapd_ee_strobes -- exhaustive check of the LAPD EEPROM write strobes:
// byte lanes from A0/size when writes are enabled, a violation instead of
// any strobe when they are not, and the SMA-read indication.
// Combinational; outputs checked 1 ns after each vector.  The byte-lane and
// write-protect rules follow the interface's LAPD EEPROM strobe device.
module tb_lapd_ee_strobes;
  logic cpsmbg_n, cpsm2dbg_n, cldesp_n, ldewe_h, cp0rw_n, cp0as_n, cp0ds_n, mpab0, smro_n, smre_n;
  logic [1:0] mpsize;
  logic ldewe_n, ldewo_n, ldeewv_n, mlceer_n;
  int checks = 0, failures = 0;

  lapd_ee_strobes dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) begin
      logic wcyc, odd;
      {cpsmbg_n, cpsm2dbg_n, cldesp_n, ldewe_h, cp0rw_n, cp0as_n, cp0ds_n, mpab0, mpsize, smro_n,
       smre_n} = 12'(i);
      #1;
      wcyc = !cpsmbg_n && !cpsm2dbg_n && !cldesp_n && !cp0rw_n && !cp0as_n && !cp0ds_n;
      odd  = mpab0 || mpsize != 2'b01;
      check("even", ldewe_n == !(wcyc && ldewe_h && !mpab0));
      check("odd", ldewo_n == !(wcyc && ldewe_h && odd));
      check("viol", ldeewv_n == !(wcyc && !ldewe_h));
      check("no strobe with violation", !(!ldeewv_n && (!ldewe_n || !ldewo_n)));
      check("mlceer", mlceer_n == (smro_n && smre_n));
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
