// mlc_grant -- MLC bus grant and delayed HOST / EX_CPU grants.
//
// Clocked on the falling edge of ARBCLK (ARBCLKI).  The MLC owns the Shared
// Memory Array while the arbiter is in S4 or S5; that condition is registered
// (S45) and OR-ed with S4, so MLCSMBGL asserts in the same half-clock as S4
// and stays asserted one half-clock after S5 ends, covering the S4/S5 state
// change.  MLCBGL, which gates the MLC chip selects, is additionally held in
// S6 so the MLC can finish its cycle while it is being asked to release.
// The HOST and EX_CPU grants are delayed by one falling edge (CPSM2DBGL,
// SYSMDBGL); the HOST write strobes use the delayed grant so that a write
// never starts on the clock the bus changes hands.  A further flip-flop on
// the rising ARBCLK edge, preset by CPDKRSTL, gives CPSMDBGL, the HOST grant
// as seen by the DSACK logic.  Equations follow the grant device and the
// clock sheet of the interface; the reset values are this design's choice.
// All signals are active low.
module mlc_grant (
  input  logic arbclk,      // 40 MHz; registers use its falling edge
  input  logic por_n,
  input  logic s4_n,
  input  logic s5_n,
  input  logic s6_n,
  input  logic cpsmbg_n,    // HOST grant from the arbiter
  input  logic sysmbg_n,    // EX_CPU grant from the arbiter
  output logic mlcsmbg_n,   // MLCSMBGL: MLC bus grant to the T7130
  output logic mlcbg_n,     // MLCBGL: MLC grant qualifying chip selects
  output logic cpsm2dbg_n,  // CPSM2DBGL: HOST grant delayed
  output logic sysmdbg_n,   // SYSMDBGL: EX_CPU grant delayed
  input  logic cpdkrst_n,   // CPDKRSTL: clears the DSACK grant flop
  output logic cpsmdbg_n    // CPSMDBGL: HOST grant for the DSACK logic
);
  logic s45; // registered "S4 or S5"

  always_ff @(negedge arbclk or negedge por_n)
    if (!por_n) begin
      s45        <= 1'b0;
      cpsm2dbg_n <= 1'b1;
      sysmdbg_n  <= 1'b1;
    end else begin
      s45        <= !s4_n || !s5_n;
      cpsm2dbg_n <= cpsmbg_n;
      sysmdbg_n  <= sysmbg_n;
    end

  // Separate flip-flop on the rising ARBCLK edge that tells the DSACK logic
  // the HOST owns the SMA; preset (inactive) as soon as the HOST address
  // strobe or its synchronised request goes away.
  logic dk_clr;
  assign dk_clr = !cpdkrst_n || !por_n;

  always_ff @(posedge arbclk or posedge dk_clr)
    if (dk_clr) cpsmdbg_n <= 1'b1;
    else                      cpsmdbg_n <= cpsmbg_n;

  assign mlcsmbg_n = !(s45 || !s4_n);
  assign mlcbg_n   = !(s45 || !s4_n || !s6_n);
endmodule
