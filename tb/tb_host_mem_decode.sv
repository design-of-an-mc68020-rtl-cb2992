// tb_host_mem_decode -- drives HOST addresses drawn from every space of the
// memory map (program EEPROM 000000, program/data SRAM 100000, LAPD EEPROM
// 200000, peripherals 300000, CSA 780000, elsewhere) with random strobes,
// direction and write enables, and checks each decode output against the
// map written as address ranges.
// Combinational: inputs applied, outputs checked 1 ns later.  The address
// ranges are the interface's memory map; the random mix is the
// testbench's own.
module tb_host_mem_decode;
  logic cp0as_n, cp0ds_n, cp0rw_n, cpsrwe_h, cpeewe_h, mpab24, cpsmbg_n;
  logic [4:0] mpab;
  logic cppdw_n, cpsrpwv_n, cpeew_n, cpeewv_n, cpmemr_n, cpsmbr_n, cldsms_n, cldesp_n;
  logic cpsmbe_n, cpdbse_n;
  int checks = 0, failures = 0;

  host_mem_decode dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [24:0] a;
      logic [22:0] off;
      logic w, ee, pd, prog, csa, ld, per;
      case ($urandom % 6)
        0: a = 25'h000000 + 25'($urandom % 32'h40000);
        1: a = 25'h100000 + 25'($urandom % 32'h80000);
        2: a = 25'h200000 + 25'($urandom % 32'h40000);
        3: a = 25'h300000 + 25'($urandom % 32'h100000);
        4: a = 25'h780000 + 25'($urandom % 32'h80000) + (($urandom % 2) ? 25'h1000000 : 25'h0);
        default: a = 25'($urandom);
      endcase
      mpab24 = a[24];
      mpab = a[22:18];
      {cp0as_n, cp0ds_n, cp0rw_n, cpsrwe_h, cpeewe_h, cpsmbg_n} = 6'($urandom);
      #1;
      off  = a[22:0];
      w    = !cp0as_n && !cp0ds_n && !cp0rw_n;
      ee   = !cp0as_n && off < 23'h040000;
      pd   = !cp0as_n && off >= 23'h100000 && off < 23'h180000;
      prog = off < 23'h140000;                     // lower half of the SRAM space
      ld   = !cp0as_n && off >= 23'h200000 && off < 23'h240000;
      per  = !cp0as_n && off >= 23'h300000 && off < 23'h400000;
      csa  = !cp0as_n && !a[24] && off >= 23'h780000;
      check("pd write", cppdw_n == !(w && pd && (!prog || cpsrwe_h)));
      check("pd viol", cpsrpwv_n == !(w && pd && prog && !cpsrwe_h));
      check("ee write", cpeew_n == !(w && ee && cpeewe_h));
      check("ee viol", cpeewv_n == !(w && ee && !cpeewe_h));
      check("memr", cpmemr_n == !cp0rw_n);
      check("sm req", cpsmbr_n == !(csa || ld));
      check("csa", cldsms_n == !csa);
      check("ld", cldesp_n == !ld);
      check("sm be", cpsmbe_n == !((csa || ld) && !cpsmbg_n));
      check("perif", cpdbse_n == !per);
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
