// mlc_dtack -- T7130 MLC data-transfer acknowledge with EEPROM wait states.
//
// The Common Shared Array SRAM answers the MLC without wait states: the
// acknowledge from sma_chip_select is passed on directly.  The LAPD protocol
// EEPROM is slower, so while the MLC is in EEPROM space the acknowledge comes
// from a two-stage shift register clocked by MFPCLK (4 MHz): both stages are
// held cleared while no SMA read strobe is active (MLCEERL inactive); once a
// read starts the first stage sets on the next MFPCLK rising edge and the
// second one clock later, so the acknowledge appears on the second MFPCLK
// edge after the read strobe, i.e. 250 to 500 ns into the access (the
// interface asks for at least 250 ns).  The shift register follows the MLC
// wait-state device; the combining of the two acknowledge sources, which the
// interface describes only in words, is written here as a two-term OR.
// Signals are active low.
module mlc_dtack #(
  parameter int unsigned WAIT_CLKS = 2  // MFPCLK edges before EEPROM DTACK
) (
  input  logic mfpclk,        // 4 MHz
  input  logic mlceer_n,      // SMA read strobe active
  input  logic mlcesp_n,      // MLC in EEPROM space (from sma_chip_select)
  input  logic sram_dtack_n,  // no-wait DTACK for CSA (from sma_chip_select)
  output logic mlcdtk1_n,     // EEPROM acknowledge after the wait
  output logic mlcdtack_n     // DTACK to the T7130
);
  logic [WAIT_CLKS-1:0] sh;   // sh[i] set = stage i reached

  always_ff @(posedge mfpclk or posedge mlceer_n)
    if (mlceer_n) sh <= '0;
    else          sh <= {sh[WAIT_CLKS-2:0], 1'b1};

  assign mlcdtk1_n  = !sh[WAIT_CLKS-1];
  assign mlcdtack_n = !(!sram_dtack_n || (!mlcesp_n && !mlcdtk1_n));
endmodule
