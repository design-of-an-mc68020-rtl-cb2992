// tb_sma_chip_select -- random vectors against a model of the SMA chip
// selects: exactly the granted master that addresses the SMA selects the
// half given by SMAB18; MLC at F8xxxx-FFxxxx gets DTACK at once, MLC at
// 20xxxx selects the EEPROM and flags EEPROM space; the HOST selects the
// EEPROM in LAPD EEPROM space with A20 low.
// Combinational; outputs checked 1 ns after each vector.  The address
// decodes follow the interface's SMA chip-select device.
module tb_sma_chip_select;
  logic spybg_n, sysmbg_n, cpsmbg_n, mlcbg_n, mlcas_n, smab18, spysmcs_n, sbas_n, cpsms_n;
  logic cldesp_n, mpab20;
  logic [4:0] mlca;
  logic smucs_n, smlcs_n, ldecs_n, mlcesp_n, mlcdtack_n;
  int checks = 0, failures = 0;

  sma_chip_select dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [23:0] maddr;
      logic mlc_csa, mlc_ee, sel;
      {spybg_n, sysmbg_n, cpsmbg_n, mlcbg_n} = 4'($urandom);
      {mlcas_n, smab18, spysmcs_n, sbas_n, cpsms_n, cldesp_n, mpab20} = 7'($urandom);
      // MLC addresses drawn from the map: CSA, EEPROM or elsewhere
      case ($urandom % 3)
        0: maddr = 24'hF80000 + 24'($urandom % 24'h80000);
        1: maddr = 24'h200000 + 24'($urandom % 24'h10000);
        default: maddr = 24'($urandom);
      endcase
      mlca = maddr[23:19];
      #1;
      mlc_csa = !mlcas_n && maddr >= 24'hF80000;
      mlc_ee  = !mlcas_n && maddr[23:20] == 4'h2;
      sel = (!mlcbg_n && mlc_csa) || (!spybg_n && !spysmcs_n) || (!sysmbg_n && !sbas_n) ||
            (!cpsmbg_n && !cpsms_n);
      check("upper", smucs_n == !(sel && smab18));
      check("lower", smlcs_n == !(sel && !smab18));
      check("ee cs", ldecs_n == !((!mlcbg_n && mlc_ee) || (!cpsmbg_n && !cldesp_n && !mpab20)));
      check("ee space", mlcesp_n == !(!mlcbg_n && mlc_ee));
      check("dtack", mlcdtack_n == !(!mlcbg_n && mlc_csa));
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
