// spy_sma_ctrl -- SPYDER-T Shared Memory Array strobes.
//
// Combinational.  While the SPYDER-T holds the SMA grant its write strobe
// drives both the even and odd byte write enables and its read strobe both
// read enables (the SPYDER-T always moves 16-bit words).  The SPYDER-T SMA
// chip select is active when the SPYDER-T drives its read strobe or its
// address strobe.  SPYSMSPL flags that the SPYDER-T is addressing SMA space
// (SPYA23..19 = 11111) while granted; the illegal-address latch in
// isr_violation samples it.  Outputs are active low; the strobe outputs are
// only meaningful while spybg_n is low (they are tri-stated on the board;
// here the bus multiplexer selects them by the grant).
module spy_sma_ctrl
  import lapd_pkg::*;
(
  input  logic       spybg_n,    // SPYDER-T grant
  input  logic       spywe_n,    // SPYDER-T write strobe
  input  logic       spyrd_n,    // SPYDER-T read strobe
  input  logic       spyas_n,    // SPYDER-T address strobe
  input  logic [4:0] spya,       // SPYA23..SPYA19
  output logic       smwe_n,     // even byte write
  output logic       smwo_n,     // odd byte write
  output logic       smre_n,     // even byte read
  output logic       smro_n,     // odd byte read
  output logic       spysmsp_n,  // SPYDER-T in SMA space
  output logic       spysmcs_n   // SPYDER-T SMA chip select
);
  assign smwe_n    = !(!spybg_n && !spywe_n);
  assign smwo_n    = smwe_n;
  assign smre_n    = !(!spybg_n && !spyrd_n);
  assign smro_n    = smre_n;
  assign spysmsp_n = !(!spybg_n && (spya == SA_CSA));
  assign spysmcs_n = !(!spyrd_n || !spyas_n);
endmodule
