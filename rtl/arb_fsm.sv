// arb_fsm -- Shared Memory Array arbitration state machine (Arbitration
// Control Block).
//
// Four masters ask for the 16-bit Shared Memory Array with synchronised,
// active-low requests: SPYDER-T (priority 1), EX_CPU (2), HOST (3) and the
// T7130 MLC (4).  From idle the highest-priority requester is granted.  A
// grant is held for as long as its owner keeps requesting, even if a
// higher-priority master asks meanwhile; when the owner drops its request the
// highest-priority master still asking is granted in the same clock.  The MLC
// is different: its grant goes through S4 (first clock) and S5 (held); if any
// other master requests while in S5 the arbiter moves to S6, which tells the
// MLC to give the bus up (the MLC bus-grant is withdrawn by mlc_grant) and
// waits for the MLC to drop its request before granting anyone else.  If the
// MLC drops out of S6 with nobody else asking (or with EX_CPU and HOST both
// asking and no SPYDER-T), the machine spends one clock with no state active
// and then returns to idle.
//
// The state sequence, priorities and hold behaviour follow the arbiter's
// published next-state equations; the binary enum encoding (instead of seven
// one-hot flip-flops) and the asynchronous power-on reset are this design's
// own.  The block also toggles MLCLK, the 20 MHz MLC clock, from ARBCLK as the
// original device does.
//
// Interface: all requests are active low and must already be synchronous to
// arbclk (see smbr_sync).  Grants are active-low, registered on the rising
// edge of arbclk, so a grant appears one clock after the request is seen.
module arb_fsm
  import lapd_pkg::*;
(
  input  logic       arbclk,      // 40 MHz arbitration clock (ARBCLK)
  input  logic       por_n,       // power-on reset, clears every grant
  input  logic       spybr1_n,    // SPYDER-T request, synchronised
  input  logic       sysmbr1_n,   // EX_CPU request, synchronised
  input  logic       cpsmbr1_n,   // HOST request, synchronised
  input  logic       mlcsmbr1_n,  // MLC request, synchronised
  output logic       spybg_n,     // S1: SPYDER-T grant
  output logic       sysmbg_n,    // S2: EX_CPU grant
  output logic       cpsmbg_n,    // S3: HOST grant
  output logic       s4_n,        // S4: first MLC grant state
  output logic       s5_n,        // S5: MLC grant held
  output logic       s6_n,        // S6: MLC asked to release
  output logic       idle_n,      // S0: idle
  output logic       mlclk,       // ARBCLK / 2
  output arb_state_e state        // current state, for observation
);

  arb_state_e nxt;

  always_comb begin
    logic spy, sys, cp, mlc, others;
    spy    = !spybr1_n;
    sys    = !sysmbr1_n;
    cp     = !cpsmbr1_n;
    mlc    = !mlcsmbr1_n;
    others = spy || sys || cp;
    nxt    = ARB_IDLE;
    unique case (state)
      // From idle and from the SPYDER grant the fixed priority decides.
      ARB_IDLE, ARB_SPY: begin
        if      (spy)  nxt = ARB_SPY;
        else if (sys)  nxt = ARB_SYS;
        else if (cp)   nxt = ARB_CP;
        else if (mlc)  nxt = ARB_MLC1;
        else           nxt = ARB_IDLE;
      end
      ARB_SYS: begin
        if      (sys)  nxt = ARB_SYS;
        else if (spy)  nxt = ARB_SPY;
        else if (cp)   nxt = ARB_CP;
        else if (mlc)  nxt = ARB_MLC1;
        else           nxt = ARB_IDLE;
      end
      ARB_CP: begin
        if      (cp)   nxt = ARB_CP;
        else if (spy)  nxt = ARB_SPY;
        else if (sys)  nxt = ARB_SYS;
        else if (mlc)  nxt = ARB_MLC1;
        else           nxt = ARB_IDLE;
      end
      ARB_MLC1:        nxt = ARB_MLC2;
      ARB_MLC2: begin
        if      (others) nxt = ARB_MREL;
        else if (mlc)    nxt = ARB_MLC2;
        else             nxt = ARB_IDLE;
      end
      ARB_MREL: begin
        if      (mlc)  nxt = ARB_MREL;
        else if (spy)  nxt = ARB_SPY;
        // EX_CPU and HOST are only granted from here when exactly one of
        // them asks; with both asking the machine passes through the void
        // state and idle, and decides by priority from there.
        else if (sys && !cp) nxt = ARB_SYS;
        else if (cp && !sys) nxt = ARB_CP;
        else           nxt = ARB_VOID;
      end
      ARB_VOID:        nxt = ARB_IDLE;
    endcase
  end

  always_ff @(posedge arbclk or negedge por_n) begin
    if (!por_n) begin
      state <= ARB_IDLE;
      mlclk <= 1'b0;
    end else begin
      state <= nxt;
      mlclk <= !mlclk;
    end
  end

  assign idle_n   = state != ARB_IDLE;
  assign spybg_n  = state != ARB_SPY;
  assign sysmbg_n = state != ARB_SYS;
  assign cpsmbg_n = state != ARB_CP;
  assign s4_n     = state != ARB_MLC1;
  assign s5_n     = state != ARB_MLC2;
  assign s6_n     = state != ARB_MREL;

  // At most one master may own the SMA at a time.
  a_one_grant: assert property (@(posedge arbclk) disable iff (!por_n)
    $onehot0({!spybg_n, !sysmbg_n, !cpsmbg_n, !s4_n || !s5_n}));

endmodule
