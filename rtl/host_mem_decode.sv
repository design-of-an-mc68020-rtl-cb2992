// host_mem_decode -- HOST (MC68020) memory-space decode.
//
// Combinational decode of the HOST address bits MPAB24 and MPAB22..18 with
// the address strobe, read/write and data strobe:
//   * program EEPROM space (A22..18 = 00000): a write is passed on as CPEEWL
//     when the EEPROM write enable from CR1 is set, otherwise it is flagged
//     as the write violation CPEEWVL;
//   * program/data SRAM space (A22..19 = 0010): the data half (A18 = 1) is
//     always writable; the program half (A18 = 0) only with the SRAM write
//     enable, else CPSRPWVL;
//   * Common Shared Array (A24 = 0, A22..19 = 1111) and LAPD EEPROM
//     (A22..18 = 01000): both raise the SMA bus request CPSMBRL and, once the
//     grant CPSMBGL is in, the SMA transceiver enable CPSMBEL;
//   * peripheral space (A22..20 = 011) enables the peripheral data buffers.
// The space patterns and which writes are checked follow the interface's
// HOST decode device.  All pins active low except the *_h enables.
module host_mem_decode
  import lapd_pkg::*;
(
  input  logic       cp0as_n,   // HOST address strobe
  input  logic       cp0ds_n,   // HOST data strobe
  input  logic       cp0rw_n,   // HOST read (1) / write (0)
  input  logic       cpsrwe_h,  // CR1: program SRAM write enable
  input  logic       cpeewe_h,  // CR1: program EEPROM write enable
  input  logic       mpab24,
  input  logic [4:0] mpab,      // MPAB22..MPAB18
  input  logic       cpsmbg_n,  // HOST SMA grant
  output logic       cppdw_n,   // program/data SRAM write
  output logic       cpsrpwv_n, // program SRAM write violation
  output logic       cpeew_n,   // program EEPROM write
  output logic       cpeewv_n,  // program EEPROM write violation
  output logic       cpmemr_n,  // memory read direction
  output logic       cpsmbr_n,  // SMA bus request
  output logic       cldsms_n,  // CSA space
  output logic       cldesp_n,  // LAPD EEPROM space
  output logic       cpsmbe_n,  // SMA transceiver enable
  output logic       cpdbse_n   // peripheral data buffer enable
);
  logic as, wr, ee_sp, pd_sp, csa_sp, ld_sp;

  assign as     = !cp0as_n;
  assign wr     = !cp0rw_n && !cp0ds_n;
  assign ee_sp  = as && (mpab == HA_EE);
  assign pd_sp  = as && (mpab[4:1] == HA_PD);
  assign csa_sp = as && !mpab24 && (mpab[4:1] == HA_CSA);
  assign ld_sp  = as && (mpab == HA_LDEE);

  assign cppdw_n   = !(wr && pd_sp && (mpab[0] || cpsrwe_h));
  assign cpsrpwv_n = !(wr && pd_sp && !mpab[0] && !cpsrwe_h);
  assign cpeew_n   = !(wr && ee_sp && cpeewe_h);
  assign cpeewv_n  = !(wr && ee_sp && !cpeewe_h);
  assign cpmemr_n  = !cp0rw_n;
  assign cpsmbr_n  = !(csa_sp || ld_sp);
  assign cldsms_n  = !csa_sp;
  assign cldesp_n  = !ld_sp;
  assign cpsmbe_n  = !((csa_sp || ld_sp) && !cpsmbg_n);
  assign cpdbse_n  = !(as && (mpab[4:2] == HA_PERIF));
endmodule
