// lapd_ee_strobes -- HOST writes into the LAPD protocol EEPROM of the SMA.
//
// Combinational.  A HOST write cycle in LAPD EEPROM space, with both the SMA
// grant and its delayed copy present, becomes the even (A0 = 0) and/or odd
// byte EEPROM write strobes when CR1's LAPD EEPROM write enable (LDEWEH) is
// set; without it no strobe is issued and the write violation LDEEWVL is
// raised instead (recorded by isr_violation).  MLCEERL marks any SMA read
// strobe and starts the EEPROM wait-state counter in mlc_dtack.  Terms follow
// the interface's LAPD EEPROM write device; all pins active low except ldewe_h.
module lapd_ee_strobes (
  input  logic cpsmbg_n,
  input  logic cpsm2dbg_n,
  input  logic cldesp_n,
  input  logic ldewe_h,       // CR1: LAPD EEPROM write enable
  input  logic cp0rw_n,
  input  logic cp0as_n,
  input  logic cp0ds_n,
  input  logic mpab0,
  input  logic [1:0] mpsize,  // SIZ1, SIZ0
  input  logic smro_n,        // SMA odd read strobe (any master)
  input  logic smre_n,        // SMA even read strobe (any master)
  output logic ldewe_n,       // even byte EEPROM write
  output logic ldewo_n,       // odd byte EEPROM write
  output logic ldeewv_n,      // LAPD EEPROM write violation
  output logic mlceer_n       // SMA read in progress
);
  logic ldcyc;

  assign ldcyc    = !cpsmbg_n && !cpsm2dbg_n && !cldesp_n && !cp0ds_n && !cp0rw_n && !cp0as_n;
  assign ldewo_n  = !(ldcyc && ldewe_h && (mpab0 || !mpsize[0] || mpsize[1]));
  assign ldewe_n  = !(ldcyc && ldewe_h && !mpab0);
  assign ldeewv_n = !(ldcyc && !ldewe_h);
  assign mlceer_n = smro_n && smre_n;
endmodule
