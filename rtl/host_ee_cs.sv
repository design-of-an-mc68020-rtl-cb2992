// host_ee_cs -- HOST program EEPROM chip selects.
//
// Combinational.  The program EEPROM (A22..18 = 00000) is a 16-bit word port
// of four byte-wide devices: even (D31..24) and odd (D23..16) bytes, each in
// an upper and a lower bank chosen by A17.  The even device is selected when
// A0 = 0; the odd device when A0 = 1 or the transfer is wider than a byte
// (SIZ0 = 0 or SIZ1 = 1).  CPEESL marks any EEPROM select and starts the
// wait-state counter in host_dsack.  CPDKRSTL resets the delayed SMA grant
// flip-flop when the HOST address strobe or its synchronised SMA request is
// negated.  Terms follow the interface's EEPROM select device; outputs are
// active low.
module host_ee_cs
  import lapd_pkg::*;
(
  input  logic       cp0as_n,
  input  logic [4:0] mpab_hi,    // MPAB22..MPAB18
  input  logic       mpab17,
  input  logic       mpab0,
  input  logic [1:0] mpsize,     // SIZ1, SIZ0
  input  logic       cpsmbr1_n,  // synchronised HOST SMA request
  output logic       cpeuecs_n,  // upper bank, even byte
  output logic       cpelecs_n,  // lower bank, even byte
  output logic       cpeuocs_n,  // upper bank, odd byte
  output logic       cpelocs_n,  // lower bank, odd byte
  output logic       cpees_n,    // any EEPROM select
  output logic       cpdkrst_n   // reset of the delayed SMA grant
);
  logic eesp, even, odd;

  assign eesp = !cp0as_n && (mpab_hi == HA_EE);
  assign even = !mpab0;
  assign odd  = mpab0 || !mpsize[0] || mpsize[1];

  assign cpeuecs_n = !(eesp && mpab17 && even);
  assign cpelecs_n = !(eesp && !mpab17 && even);
  assign cpeuocs_n = !(eesp && mpab17 && odd);
  assign cpelocs_n = !(eesp && !mpab17 && odd);
  assign cpees_n   = cpeuecs_n && cpelecs_n && cpeuocs_n && cpelocs_n;
  assign cpdkrst_n = !(cp0as_n || cpsmbr1_n);
endmodule
