// host_reset -- HOST reset and halt generation.
//
// The MC68020 is reset by power-on (PRSTL), by the EX_CPU through the System
// Control Register HOST RST bit (CUPRSTH), or by a GPIT reset request
// (GPRSTH).  The GPIT request sets a latch (GPRST1L) that is released through
// a two-flop synchroniser on BFRM, so even a short request gives a reset of
// at least two BFRM periods (three rising edges after it is set).  HOST HLT from the System
// Control Register drives the halt line directly.  CPHORH asserts reset or
// halt towards an external monitor when enabled by CPHORENH.  After a
// control-register reset, SYCRGCL pulses low two BFRM clocks later to clear
// the System Control Register, which makes HOST RST self-clearing.  The
// structure follows the interface's reset device; the polarity of PRSTL
// (active low, power-on reset) is taken from its name.
module host_reset (
  input  logic bfrm,        // BFRM clock
  input  logic prst_n,      // power-on reset
  input  logic cuprst_h,    // System Control: HOST RST
  input  logic cuphlt_h,    // System Control: HOST HLT
  input  logic cphoren_h,   // enable of the reset/halt indication
  input  logic gprst_h,     // GPIT reset request
  output logic cphor_h,
  output logic cprst_h,     // reset to the MC68020
  output logic cphlt_h,     // halt to the MC68020
  output logic gprst1_n,    // GPIT reset latch
  output logic sycrgc_n     // clear of the System Control Register
);
  logic sycrgc1_n, sygprst1_h, sygprst_h;

  // GPIT reset latch: set at once by the request, released on the BFRM edge
  // after the synchroniser has seen it (the original is a feedback latch;
  // a flip-flop with asynchronous set gives the same pulse one BFRM later
  // without a level-sensitive storage element).
  logic gp_set;
  assign gp_set = !prst_n || gprst_h;

  always_ff @(posedge bfrm or posedge gp_set)
    if (gp_set)         gprst1_n <= 1'b0;
    else if (sygprst_h) gprst1_n <= 1'b1;

  always_ff @(posedge bfrm or negedge prst_n)
    if (!prst_n) begin
      sycrgc1_n  <= 1'b1;
      sycrgc_n   <= 1'b1;
      sygprst1_h <= 1'b0;
      sygprst_h  <= 1'b0;
    end else begin
      sycrgc1_n  <= !cuprst_h;
      sycrgc_n   <= sycrgc1_n;
      sygprst1_h <= !gprst1_n;
      sygprst_h  <= sygprst1_h;
    end

  assign cphor_h = cphoren_h && (cuprst_h || cuphlt_h);
  assign cprst_h = !prst_n || cuprst_h || !gprst1_n;
  assign cphlt_h = cuphlt_h;
endmodule
