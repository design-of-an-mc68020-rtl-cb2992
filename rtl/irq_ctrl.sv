// irq_ctrl -- HOST Interrupt Request Register (IRR) and data buffer enable.
//
// IRR bit 31 is the HOST-to-EX_CPU request: a HOST write to the IRR loads
// D31 into a latch at the end of the write strobe; writing 0 makes the
// request pending.  The request goes to the EX_CPU only while the System
// Control Register enables it (HOST INTEN) and is withdrawn when the EX_CPU
// acknowledges it or on reset.  A read of the IRR returns the latch on D31.
// IRR bit 30 is the HOST-to-MLC request and is not stored: the MLC interrupt
// line is active while a write to the IRR carries D30 = 0, and also whenever
// the SPYDER-T raises its interrupt output.  CPDBENL enables the HOST
// peripheral data buffers during peripheral cycles and interrupt
// acknowledges.  Behaviour follows the register description and the
// interface's interrupt device; the latch clocking is this design's choice.
// Signals active low unless named _h.
module irq_ctrl (
  input  logic rst_n,
  input  logic cp0rw_n,
  input  logic cp0ds_n,
  input  logic cp0as_n,
  input  logic cpuirs_n,   // IRR select
  input  logic cpdb31,
  input  logic cpdb30,
  input  logic spyint0_n,  // SPYDER-T interrupt
  input  logic sirqen_h,   // System Control: HOST INTEN
  input  logic sysiack_n,  // EX_CPU acknowledge of the HOST request
  input  logic cpiack_n,   // HOST interrupt acknowledge
  input  logic cpdbse_n,   // peripheral space
  output logic sirq_n,     // IRR bit 31 latch (0 = request pending)
  output logic cpuirq_n,   // request to the EX_CPU
  output logic mlcirq_n,   // interrupt to the MLC
  output logic cp2db31,    // IRR read-back on D31
  output logic rd_en,
  output logic cpdben_n    // peripheral data buffer enable
);
  logic irr_wr;
  assign irr_wr = !cp0rw_n && !cp0ds_n && !cpuirs_n;

  logic irq_clr;
  assign irq_clr = !rst_n || !sysiack_n;

  always_ff @(posedge irr_wr or posedge irq_clr)
    if (irq_clr) sirq_n <= 1'b1;
    else                      sirq_n <= cpdb31;

  assign cpuirq_n = !(!sirq_n && sirqen_h);
  assign mlcirq_n = !((irr_wr && !cpdb30) || !spyint0_n);
  assign rd_en    = cp0rw_n && !cp0ds_n && !cpuirs_n;
  assign cp2db31  = sirq_n;
  assign cpdben_n = !((!cpiack_n || !cpdbse_n) && !cp0as_n);
endmodule
