// sma_chip_select -- Shared Memory Array chip selects and MLC no-wait DTACK.
//
// Purely combinational.  The SMA has an upper and a lower SRAM half chosen by
// SMAB18; each half's chip select is active when the current bus owner both
// holds its grant and addresses SMA space: the MLC (address strobe with
// MLCA23..19 = 11111), the SPYDER-T (its SMA chip select), the EX_CPU (its
// address strobe SBASL) or the HOST (its SMA select CPSMSL).  The LAPD EEPROM
// is selected by the MLC at MLCA23..20 = 0010 or by the HOST in LAPD EEPROM
// space with MPAB20 low.  For SRAM the MLC is acknowledged at once
// (MLCDTACKL); for EEPROM the space flag MLCESPL hands the acknowledge to the
// wait-state logic in mlc_dtack.  The decode terms follow the interface's
// chip-select device; outputs are active low.
module sma_chip_select
  import lapd_pkg::*;
(
  input  logic       spybg_n,    // SPYDER-T grant
  input  logic       sysmbg_n,   // EX_CPU grant
  input  logic       cpsmbg_n,   // HOST grant
  input  logic       mlcbg_n,    // MLC grant (MLCBGL)
  input  logic [4:0] mlca,       // MLCA23..MLCA19
  input  logic       mlcas_n,    // MLC address strobe
  input  logic       smab18,     // SMA address bit 18: upper/lower half
  input  logic       spysmcs_n,  // SPYDER-T SMA chip select
  input  logic       sbas_n,     // EX_CPU address strobe
  input  logic       cpsms_n,    // HOST CSA select
  input  logic       cldesp_n,   // HOST LAPD EEPROM space
  input  logic       mpab20,     // HOST address bit 20
  output logic       smucs_n,    // upper SRAM chip select
  output logic       smlcs_n,    // lower SRAM chip select
  output logic       ldecs_n,    // LAPD EEPROM chip select
  output logic       mlcesp_n,   // MLC in EEPROM space
  output logic       mlcdtack_n  // MLC DTACK for SRAM (no wait state)
);
  logic mlc_sram, mlc_ee, any_sram;

  assign mlc_sram = !mlcas_n && (mlca == MA_CSA);
  assign mlc_ee   = !mlcas_n && (mlca[4:1] == MA_LDEE);
  assign any_sram = (mlc_sram && !mlcbg_n) || (!spysmcs_n && !spybg_n) ||
                    (!sbas_n && !sysmbg_n) || (!cpsms_n && !cpsmbg_n);

  assign smucs_n    = !(any_sram && smab18);
  assign smlcs_n    = !(any_sram && !smab18);
  assign ldecs_n    = !((mlc_ee && !mlcbg_n) || (!cpsmbg_n && !cldesp_n && !mpab20));
  assign mlcesp_n   = !(mlc_ee && !mlcbg_n);
  assign mlcdtack_n = !(mlc_sram && !mlcbg_n);
endmodule
