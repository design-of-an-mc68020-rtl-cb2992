// host_ctrl_regs -- HOST control registers CR0 and CR1 with their strobes.
//
// The register block decodes, from the CR0/CR1/ISR selects, the data strobe
// and read/write, the read enables and write clocks of the registers.  CR0
// and CR1 are 8-bit registers on HOST data bits D31..24, loaded at the end of
// the write strobe (rising edge of the write clock, data still valid) and
// read back on D31..24.
//   CR0: D31 MFP RST, D30 BIM RST, D28 T7121 RST, D27 T7130 RST,
//        D26 T7115 RST (all active low, so a reset is "write 0, write 1"),
//        D24 T7115A SA -- not stored: writing 0 to D24 gives a pulse on the
//        SPYDER-T attention pin for as long as the write strobe lasts.
//   CR1: D31 program EEPROM write enable, D30 program SRAM write enable,
//        D29 LAPD EEPROM write enable, D28..24 spare read/write bits.
// Both registers clear on the interface reset, so after power-up all
// peripherals are held in reset and all writes are protected until the HOST
// enables them.  The bit map and the strobes follow the interface; clearing
// CR0 on reset, the SPYDER-T reset polarity (active high, as its output name
// says) and the read-back of CR0 are this design's reading of it.
module host_ctrl_regs
  import lapd_pkg::*;
(
  input  logic       rst_n,      // interface reset (clears CR0 and CR1)
  input  logic       cr0s_n,
  input  logic       cr1s_n,
  input  logic       irs_n,
  input  logic       cp0rw_n,
  input  logic       cp0ds_n,
  input  logic [7:0] cpdb_hi,    // CPDB31..CPDB24 write data
  output logic       cr0rd_n,
  output logic       cr0ck_n,
  output logic       cr1rd_n,
  output logic       cr1ck_n,
  output logic       isrd_n,     // ISR read
  output logic       isrc_n,     // ISR write = clear
  output logic       spysa,      // SPYDER-T attention pulse
  output logic [7:0] cr0,
  output logic [7:0] cr1,
  output logic       mfprst_n,
  output logic       bimrst_n,
  output logic       hifirst_h,
  output logic       mlcrst_n,
  output logic       spyrst_h,
  output logic       cpeewe_h,   // EEWEN_MP
  output logic       cpsrwe_h,   // SRWEN_MP
  output logic       ldewe_h,    // EEWEN_LD
  output logic [7:0] rdata,      // D31..24 read-back
  output logic       rd_en       // rdata valid (drive the bus)
);
  logic rd, wt;
  assign rd = !cp0ds_n && cp0rw_n;
  assign wt = !cp0ds_n && !cp0rw_n;

  assign cr0rd_n = !(!cr0s_n && rd);
  assign cr0ck_n = !(!cr0s_n && wt);
  assign cr1rd_n = !(!cr1s_n && rd);
  assign cr1ck_n = !(!cr1s_n && wt);
  assign isrd_n  = !(!irs_n && rd);
  assign isrc_n  = !(!irs_n && wt);
  assign spysa   = !cr0ck_n && !cpdb_hi[CR0_SPYSA];

  always_ff @(posedge cr0ck_n or negedge rst_n)
    if (!rst_n) cr0 <= '0;
    else        cr0 <= cpdb_hi & 8'hDC;   // D29, D25, D24 not stored

  always_ff @(posedge cr1ck_n or negedge rst_n)
    if (!rst_n) cr1 <= '0;
    else        cr1 <= cpdb_hi;

  assign mfprst_n  = cr0[CR0_MFPRST];
  assign bimrst_n  = cr0[CR0_BIMRST];
  assign hifirst_h = !cr0[CR0_HIFIRST];
  assign mlcrst_n  = cr0[CR0_MLCRST];
  assign spyrst_h  = !cr0[CR0_SPYRST];
  assign cpeewe_h  = cr1[CR1_EEWEN_MP];
  assign cpsrwe_h  = cr1[CR1_SRWEN_MP];
  assign ldewe_h   = cr1[CR1_EEWEN_LD];

  assign rd_en = !cr0rd_n || !cr1rd_n;
  assign rdata = !cr0rd_n ? cr0 : cr1;
endmodule
