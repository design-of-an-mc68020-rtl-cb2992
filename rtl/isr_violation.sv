// isr_violation -- HOST Interrupt Status Register and SPYDER-T illegal
// address latch.
//
// Three write-violation flags are set asynchronously by their violation
// strobes and stay set until the HOST writes the ISR (any data: addressing
// the register in write mode clears all flags).  They read back on D31
// (program EEPROM), D30 (program SRAM) and D29 (LAPD EEPROM) while the ISR
// read strobe is active.  WRTVL, the BIM channel 3 request, is active while
// any flag is set.  The SPYDER-T has no transfer acknowledge, so each of its
// bus cycles is checked: on the rising edge of its address strobe (end of
// the cycle) the latch SPYIAL records whether the address was outside SMA
// space; it drives the BIM channel 2 request until the interrupt
// acknowledge for that channel clears it.  The flags and latch follow the
// interface's ISR device; the choice of the strobe edge is this design's.
// A set strobe wins over a simultaneous clear.  Signals active low except
// the read data.
module isr_violation (
  input  logic       rst_n,      // interface reset
  input  logic       cpeewv_n,   // program EEPROM write violation
  input  logic       cpsrpwv_n,  // program SRAM write violation
  input  logic       ldeewv_n,   // LAPD EEPROM write violation
  input  logic       isrd_n,     // ISR read
  input  logic       isrc_n,     // ISR write = clear
  input  logic       spysmsp_n,  // SPYDER-T inside SMA space
  input  logic       spyas_n,    // SPYDER-T address strobe
  input  logic       clrspia_n,  // interrupt acknowledge of BIM CH2
  output logic [2:0] flags,      // {EEWV_MP, SRWV_MP, EEWV_LD}, 1 = set
  output logic [7:0] rdata,      // D31..24 read-back
  output logic       rd_en,
  output logic       wrtv_n,     // BIM CH3 request
  output logic       spyia_n     // BIM CH2 request
);
  logic clr;
  assign clr = !isrc_n || !rst_n;

  // Each flag: asynchronous set by its violation, cleared by the edge of
  // the clear (a violation still present at that moment keeps it set).
  logic set_ee_mp, set_sr_mp, set_ee_ld;
  logic ee_mp, sr_mp, ee_ld;
  assign set_ee_mp = !cpeewv_n;
  assign set_sr_mp = !cpsrpwv_n;
  assign set_ee_ld = !ldeewv_n;

  always_ff @(posedge clr or posedge set_ee_mp)
    if (set_ee_mp) ee_mp <= 1'b1; else ee_mp <= 1'b0;
  always_ff @(posedge clr or posedge set_sr_mp)
    if (set_sr_mp) sr_mp <= 1'b1; else sr_mp <= 1'b0;
  always_ff @(posedge clr or posedge set_ee_ld)
    if (set_ee_ld) ee_ld <= 1'b1; else ee_ld <= 1'b0;
  assign flags = {ee_mp, sr_mp, ee_ld};

  assign wrtv_n = !(|flags);
  assign rd_en  = !isrd_n;
  assign rdata  = {flags, 5'b0};

  logic ia_clr;
  assign ia_clr = !clrspia_n || !rst_n;

  always_ff @(posedge spyas_n or posedge ia_clr)
    if (ia_clr) spyia_n <= 1'b1;
    else                      spyia_n <= !spysmsp_n;
endmodule
