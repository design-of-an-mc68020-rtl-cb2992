// host_dsack -- HOST data-transfer-and-size acknowledge (DSACK0/DSACK1).
//
// A four-stage shift register on SPYCLK (16.67 MHz) counts wait states: it is
// held cleared while no slow cycle is running (no EEPROM select, no delayed
// SMA grant, no peripheral cycle and no BIM interrupt acknowledge) and
// otherwise fills one stage per clock, giving taps W2, W4, W6 and W8 one,
// two, three and four SPYCLK periods (two, four, six and eight HOST clocks)
// after the cycle starts.  DSACK0 (byte port) answers the Interrupt Request
// Register and the HIFI-64 at W6, the other register-block addresses at W2,
// and passes on the DSACK outputs of the MFP, BIM and UART during a
// peripheral cycle or interrupt acknowledge.  DSACK1 (word port) answers the
// program EEPROM at W8, the LAPD EEPROM in the SMA at W6 and the CSA as soon
// as the delayed SMA grant is present.  Taps and terms follow the interface's
// DSACK device.  Signals active low.
module host_dsack (
  input  logic spyclk,
  input  logic cp0as_n,
  input  logic cpees_n,     // program EEPROM select
  input  logic cpsmdbg_n,   // delayed HOST SMA grant
  input  logic cldsms_n,    // CSA space
  input  logic cldesp_n,    // LAPD EEPROM space
  input  logic cpuirs_n,    // IRR select
  input  logic perifdk_n,   // register block
  input  logic hifics_n,
  input  logic mfpdk0_n,    // MFP DTACK
  input  logic bdk0_n,      // BIM DTACK
  input  logic udk0_n,      // UART DTACK
  input  logic perifcs_n,   // delayed peripheral cycle select
  input  logic biackin_n,   // BIM interrupt acknowledge in
  output logic resen0_n,    // wait counter enabled
  output logic [3:0] w,     // W8, W6, W4, W2 (1 = tap reached)
  output logic cpdsack0_n,
  output logic cpdsack1_n
);
  logic as, pcyc, dev_dk;

  assign resen0_n = !(cpees_n && cpsmdbg_n && perifcs_n && biackin_n);

  always_ff @(posedge spyclk or negedge resen0_n)
    if (!resen0_n) w <= '0;
    else           w <= {w[2:0], 1'b1};

  assign as     = !cp0as_n;
  assign pcyc   = !perifcs_n;
  assign dev_dk = !mfpdk0_n || !bdk0_n || !udk0_n;

  assign cpdsack0_n = !(as && (
      (w[2] && !cpuirs_n && pcyc) ||
      (w[2] && !hifics_n && pcyc) ||
      (w[0] && cpuirs_n && hifics_n && !perifdk_n && pcyc) ||
      (dev_dk && (pcyc || !biackin_n))));

  assign cpdsack1_n = !(as && (
      (w[3] && !cpees_n) ||
      (w[2] && !cldesp_n && !cpsmdbg_n) ||
      (!cldsms_n && !cpsmdbg_n)));
endmodule
